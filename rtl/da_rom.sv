// da_rom: one distributed-arithmetic ROM table of the 1-D DCT/IDCT unit.
//
// Row ROW of the Chen matrix (0..3 even half, 4..7 odd half) has four
// coefficients c0..c3. The table holds, for every 4-bit pattern b3..b0, the sum
// of the c_k whose b_k is 1, so that one lookup per bit position replaces four
// multiplications. Only 2^4 words per direction are stored: the sign bit of the
// operands is handled by subtraction in the accumulator, not by a doubled
// table. The mode input selects the forward or inverse table (the even rows
// differ between them), so the ROM has 32 words. Contents come from
// dct_pkg::rom_word(), in two's complement with COEF_FRAC fraction bits.
//
// Interface: asynchronous read, data = table[{mode, addr}].
module da_rom
  import dct_pkg::*;
#(
  parameter int ROW = 0
) (
  input  mode_e        mode,
  input  logic [3:0]   addr,
  output rom_word_t    data
);
  rom_word_t table_q [32];

  // Filled once from the coefficient constants; the array is a constant table.
  always_comb begin
    for (int i = 0; i < 16; i++) begin
      table_q[i]      = rom_word_t'(rom_word(MODE_DCT,  ROW, 4'(i)));
      table_q[16 + i] = rom_word_t'(rom_word(MODE_IDCT, ROW, 4'(i)));
    end
  end

  assign data = table_q[{mode, addr}];
endmodule

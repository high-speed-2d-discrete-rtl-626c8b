// da_accumulator: shift-accumulator of the distributed-arithmetic datapath.
//
// The operands arrive bit-serially, most significant (sign) bit first. For
// each bit position the ROM delivers the sum of the coefficients whose operand
// bit is 1; the accumulator doubles its contents and adds that word, except on
// the sign bit, where it starts from zero and subtracts it:
//   first cycle:  acc = -rom
//   later cycles: acc = 2*acc + rom
// After OP_W cycles acc = sum_k c_k * x_k exactly (two's complement operands).
// The addition uses csel_adder32; subtraction is done as a + ~b + 1.
//
// Interface: en advances one bit, first marks the sign-bit cycle, acc is the
// registered result. Synchronous, active-high reset. The adder's carry out is
// left unused: the accumulator works modulo 2^32, and every partial sum of a
// valid operand vector fits in 32 bits.
module da_accumulator
  import dct_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      en,
  input  logic      first,
  input  rom_word_t rom,
  output acc_t      acc
);
  logic [ACC_W-1:0] opa, opb, sum;
  logic             cout;

  always_comb begin
    opa = first ? '0 : {acc[ACC_W-2:0], 1'b0};
    opb = first ? ~ACC_W'(rom) : ACC_W'(rom);
  end

  csel_adder32 u_add (.a(opa), .b(opb), .cin(first), .sum(sum), .cout(cout));

  always_ff @(posedge clk) begin
    if (rst)     acc <= '0;
    else if (en) acc <= acc_t'(sum);
  end
endmodule

// tb_da_accumulator: drives the shift-accumulator exactly as the DA engine
// does. Four random 17-bit operands and four random coefficients are chosen;
// for each bit position, MSB first, the testbench itself forms the "ROM word"
// (sum of the coefficients whose operand bit is set) and after 17 cycles the
// accumulator must hold sum_k c_k * x_k, computed here by multiplication.
// Coefficients are bounded by +-5800, so a ROM word stays within +-23200, the
// range of the real tables (largest word 4A = 23172).
// Also checks that the result is held while en is low.
module tb_da_accumulator;
  import dct_pkg::*;
  logic clk = 0, rst = 1, en = 0, first = 0;
  rom_word_t rom;
  acc_t      acc;
  int checks = 0, failures = 0;

  da_accumulator dut (.clk(clk), .rst(rst), .en(en), .first(first), .rom(rom), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [OP_W-1:0] x [4];
    int signed c [4];
    longint signed expv;
    rom = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 3000; t++) begin
      expv = 0;
      for (int k = 0; k < 4; k++) begin
        x[k] = OP_W'($urandom);
        c[k] = $signed($urandom_range(0, 11600)) - 5800;
        if (t == 0) begin x[k] = -(1 <<< (OP_W-1)); c[k] = -5800; end
        if (t == 1) begin x[k] = (1 <<< (OP_W-1)) - 1; c[k] = 5800; end
        expv += longint'(c[k]) * longint'(x[k]);
      end
      for (int n = OP_W - 1; n >= 0; n--) begin
        int signed s;
        s = 0;
        for (int k = 0; k < 4; k++) if (x[k][n]) s += c[k];
        @(negedge clk);
        en = 1; first = (n == OP_W - 1); rom = rom_word_t'(s);
      end
      @(negedge clk);
      en = 0; first = 0; rom = $urandom;
      @(negedge clk);
      checks++;
      if (longint'(acc) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d got %0d exp %0d", t, acc, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

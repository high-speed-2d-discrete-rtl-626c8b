// tb_dct_preproc: random sample vectors through the pre-processor in both
// directions. Forward: operands must be x[i]+x[7-i] and x[i]-x[7-i] with no
// overflow (17-bit results, checked with extreme inputs too). Inverse: the
// even-indexed inputs must appear on operands 0..3 and the odd ones on 4..7.
module tb_dct_preproc;
  import dct_pkg::*;
  mode_e    mode;
  sample_t  x  [N];
  operand_t op [N];
  int checks = 0, failures = 0;

  dct_preproc dut (.mode(mode), .x(x), .op(op));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int e [N];
      mode = mode_e'(t % 2);
      for (int i = 0; i < N; i++) begin
        x[i] = sample_t'($urandom);
        if (t < 4) x[i] = (i % 2 == t / 2) ? 16'sh7FFF : 16'sh8000;
      end
      #1;
      for (int i = 0; i < 4; i++) begin
        if (mode == MODE_DCT) begin
          e[i]     = int'(x[i]) + int'(x[7-i]);
          e[4 + i] = int'(x[i]) - int'(x[7-i]);
        end else begin
          e[i]     = int'(x[2*i]);
          e[4 + i] = int'(x[2*i + 1]);
        end
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(op[i]) != e[i]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d i=%0d got %0d exp %0d", t, i, op[i], e[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dct_postproc: random accumulator results (up to the largest magnitude a
// 17-bit operand vector can produce) through the post-processor. Expected
// values are computed in real arithmetic: forward, y[2j] = acc[j]/2^14 and
// y[2j+1] = acc[4+j]/2^14; inverse, y[j] = (acc[j]+acc[4+j])/2^14 and
// y[7-j] = (acc[j]-acc[4+j])/2^14; each rounded half-up to an integer.
module tb_dct_postproc;
  import dct_pkg::*;
  mode_e mode;
  acc_t  acc [N];
  pre_t  y   [N];
  int checks = 0, failures = 0;

  dct_postproc dut (.mode(mode), .acc(acc), .y(y));

  function automatic longint rnd(real v);
    return longint'($floor(v / 16384.0 + 0.5));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      longint e [N];
      mode = mode_e'(t % 2);
      for (int i = 0; i < N; i++) begin
        acc[i] = acc_t'($signed($urandom_range(0, 32'h5A00_0000)) - 32'sh2D00_0000);
        if (t < 2) acc[i] = 32'sh5A00_0000;
        if (t == 2 || t == 3) acc[i] = -32'sh5A00_0000;
        if (t < 4 && i >= 4 && mode == MODE_IDCT) acc[i] = acc[i - 4];
      end
      #1;
      for (int j = 0; j < 4; j++) begin
        if (mode == MODE_DCT) begin
          e[2*j]     = rnd($itor(acc[j]));
          e[2*j + 1] = rnd($itor(acc[4 + j]));
        end else begin
          e[j]       = rnd($itor(acc[j]) + $itor(acc[4 + j]));
          e[7 - j]   = rnd($itor(acc[j]) - $itor(acc[4 + j]));
        end
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (longint'(y[i]) != e[i]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d i=%0d got %0d exp %0d", t, i, y[i], e[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

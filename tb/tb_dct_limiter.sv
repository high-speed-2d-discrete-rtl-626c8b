// tb_dct_limiter: sweeps the whole 20-bit input range of the limiter and checks
// saturation to [-32768, 32767] and the clipped flag.
module tb_dct_limiter;
  logic signed [19:0] din;
  logic signed [15:0] dout;
  logic clipped;
  int checks = 0, failures = 0;

  dct_limiter #(.IN_W(20), .OUT_W(16)) dut (.din(din), .dout(dout), .clipped(clipped));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(1 << 19); v < (1 << 19); v += 7) begin
      int e;
      logic ec;
      din = 20'(v);
      #1;
      e  = (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
      ec = (v > 32767) || (v < -32768);
      checks++;
      if (int'(dout) != e || clipped != ec) begin
        failures++;
        if (failures < 10) $display("FAIL in=%0d got %0d/%b exp %0d/%b", v, dout, clipped, e, ec);
      end
    end
    for (int v = 32760; v < 32780; v++) begin
      for (int s = -1; s <= 1; s += 2) begin
        int e;
        din = 20'(s * v);
        #1;
        e = (s * v > 32767) ? 32767 : (s * v < -32768) ? -32768 : s * v;
        checks++;
        if (int'(dout) != e) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_csel_adder32: checks the 32-bit carry-select adder against the
// simulator's own 33-bit addition, on corner cases chosen to exercise the
// carry chain across every group boundary (4, 8, 13, 19, 26) and on random
// operands, with both values of carry-in.
module tb_csel_adder32;
  logic [31:0] a, b, sum;
  logic        cin, cout;
  int checks = 0, failures = 0;

  csel_adder32 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check();
    logic [32:0] ref_v;
    #1;
    ref_v = {1'b0, a} + {1'b0, b} + {32'b0, cin};
    checks++;
    if ({cout, sum} !== ref_v) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%b got %h ref %h", a, b, cin, {cout, sum}, ref_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // carries rippling from bit 0 into each group boundary
    for (int p = 0; p < 32; p++) begin
      for (int c = 0; c < 2; c++) begin
        a = (32'h1 << p) - 32'h1; b = 32'h1; cin = c[0]; check();
        a = 32'hFFFF_FFFF >> p;   b = 32'h0; cin = 1'b1; check();
        a = 32'h1 << p;           b = 32'h1 << p; cin = c[0]; check();
      end
    end
    a = 32'hFFFF_FFFF; b = 32'hFFFF_FFFF; cin = 1'b1; check();
    a = 32'hFFFF_FFFF; b = 32'h0;         cin = 1'b1; check();
    for (int i = 0; i < 20000; i++) begin
      a = $urandom; b = $urandom; cin = $urandom_range(0, 1);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

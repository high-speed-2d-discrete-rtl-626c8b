// tb_transpose_ram: fills the 64-word memory with random words, reads every
// address back through the asynchronous read port, and checks that a write
// changes only its own address and that reads need no clock.
module tb_transpose_ram;
  logic clk = 0, we = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [64];
  int checks = 0, failures = 0;

  transpose_ram #(.DEPTH(64), .W(16)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 20; pass++) begin
      for (int a = 0; a < 64; a++) begin
        @(negedge clk);
        we = 1; waddr = 6'(a); wdata = 16'($urandom); model[a] = wdata;
      end
      @(negedge clk);
      we = 0;
      // random single overwrites
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        we = 1; waddr = 6'($urandom); wdata = 16'($urandom); model[waddr] = wdata;
      end
      @(negedge clk);
      we = 0;
      for (int a = 63; a >= 0; a--) begin
        raddr = 6'(a);
        #1;
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          if (failures < 10) $display("FAIL addr=%0d got %h exp %h", a, rdata, model[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

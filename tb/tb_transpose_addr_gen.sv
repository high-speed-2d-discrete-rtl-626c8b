// tb_transpose_addr_gen: the address generator with its two RAM banks. Twenty
// blocks of 64 random words, each with a random direction flag, are written
// with random gaps; the read side takes them with a randomly throttled ready.
// Every word read must be the transposed one: read t of a block (t = 8c + r)
// returns the word written at position 8r + c, with the block's flag. The
// testbench also counts cycles where a write and a read happen together
// (both banks in use) and cycles where the writer is held off because both
// banks are full; each must occur.
module tb_transpose_addr_gen;
  import dct_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  sample_t in_data = '0, out_data;
  mode_e in_mode = MODE_DCT, out_mode;
  logic [1:0] ram_we;
  logic both_full;
  logic [5:0] ram_waddr, ram_raddr;
  sample_t ram_rdata [2];
  int checks = 0, failures = 0;

  transpose_addr_gen dut (
    .clk(clk), .rst(rst),
    .in_valid(in_valid), .in_ready(in_ready), .in_mode(in_mode),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data), .out_mode(out_mode),
    .ram_we(ram_we), .ram_waddr(ram_waddr),
    .ram_raddr(ram_raddr), .ram_rdata(ram_rdata), .both_full(both_full)
  );
  for (genvar b = 0; b < 2; b++) begin : g_bank
    transpose_ram #(.DEPTH(64), .W(16)) u_ram (
      .clk(clk), .we(ram_we[b]), .waddr(ram_waddr), .wdata(in_data),
      .raddr(ram_raddr), .rdata(ram_rdata[b])
    );
  end

  always #5 clk = ~clk;

  localparam int NB = 20;
  int  data_q [NB][64];
  bit  mode_q [NB];
  int  nboth = 0, nfull = 0;
  bit  slow = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      mode_q[b] = 1'($urandom_range(0, 1));
      for (int i = 0; i < 64; i++) data_q[b][i] = int'(sample_t'($urandom));
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      out_ready <= slow ? ($urandom_range(0, 7) == 0) : ($urandom_range(0, 3) != 0);
      if (in_valid && in_ready && out_valid && out_ready) nboth++;
      if (in_valid && !in_ready) nfull++;
      if ((in_valid && !in_ready) != both_full && in_valid) begin
        failures++;
        $display("FAIL both_full flag disagrees with in_ready");
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int b = 0; b < NB; b++) begin
      slow = (b >= 4 && b < 8);
      for (int i = 0; i < 64; i++) begin
        while ($urandom_range(0, 4) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_data  <= sample_t'(data_q[b][i]);
        in_mode  <= mode_e'(mode_q[b]);
        @(posedge clk iff in_ready);
      end
    end
    in_valid <= 0;
  end

  initial begin
    @(negedge rst);
    for (int b = 0; b < NB; b++) begin
      for (int t = 0; t < 64; t++) begin
        int r, c;
        @(posedge clk iff (out_valid && out_ready));
        r = t % 8;
        c = t / 8;
        checks++;
        if (int'(out_data) != data_q[b][8*r + c] || out_mode != mode_e'(mode_q[b])) begin
          failures++;
          if (failures < 10)
            $display("FAIL block %0d read %0d: got %0d exp %0d", b, t, out_data, data_q[b][8*r + c]);
        end
      end
    end
    checks += 2;
    if (nboth == 0) begin failures++; $display("FAIL no overlapped write and read"); end
    if (nfull == 0) begin failures++; $display("FAIL both banks never full"); end
    $display("overlapped cycles %0d, writer held %0d", nboth, nfull);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// transpose_ram: DEPTH x W memory holding one 8x8 block between the row and the
// column pass. One synchronous write port and one asynchronous read port
// (like the distributed RAM of the FPGA family the design was built for), so a
// read address presented in a cycle returns its word in the same cycle. The
// addressing that makes it a transpose memory lives in transpose_addr_gen.
// The contents are not reset: every word is written before it is read.
module transpose_ram #(
  parameter int DEPTH = 64,
  parameter int W     = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule

// dct2d_top: 8x8 two-dimensional DCT/IDCT processor.
//
// The 2-D transform is computed by row-column decomposition:
//   input -> row dct_1d_unit -> dct_limiter -> transpose memory (two
//   transpose_ram banks driven by transpose_addr_gen) -> column dct_1d_unit
//   -> dct_limiter -> output.
// The row pass transforms the eight rows of a block and writes the results
// row-major into one bank; the column pass reads that bank column-major and
// transforms the columns. With two banks in ping-pong, the row pass of the next
// block runs while the column pass of the current one reads, so the two passes
// form a two-stage pipeline.
//
// Interface (valid/ready on both sides, one 16-bit word per transfer):
//   in_data   samples of a block in row-major order, x[r][c] at position 8r+c;
//             mode is sampled with the first sample of each block
//             (0 = forward DCT, 1 = inverse DCT) and applies to the block.
//   out_data  results in column-major order: position 8v+u carries Z[u][v]
//             (u = row index, v = column index of the 2-D result), out_mode
//             is the direction of the block being output.
// The overall scale is that of the orthonormal 2-D DCT (1/4 C(u) C(v) in the
// forward direction), and the results are rounded to integers and saturated
// to 16 bits after each pass.
// events reports, per cycle, DA-engine stalls and limiter saturation of
// either pass, for monitoring.
// Timing: each 1-D unit accepts one row every 18 cycles, so a pass takes
// 8 x 18 = 144 cycles per block; with both passes overlapped the sustained
// rate is one block per 144 cycles, and the first result of a block appears
// about 188 cycles after its first sample.
// Synchronous, active-high reset.
module dct2d_top
  import dct_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    mode,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t in_data,
  output logic    out_valid,
  input  logic    out_ready,
  output sample_t out_data,
  output logic    out_mode,
  // activity flags, one cycle each:
  // [0] row-pass DA results held (output busy), [1] same for the column pass,
  // [2] row-pass result saturated by its limiter, [3] same for the column pass,
  // [4] both transpose banks full (the row pass is being held off)
  output logic [4:0] events
);
  // direction of the block being input
  logic [5:0] icnt;
  mode_e      bmode_q, bmode;
  assign bmode = (icnt == 6'd0) ? mode_e'(mode) : bmode_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      icnt    <= '0;
      bmode_q <= MODE_DCT;
    end else if (in_valid && in_ready) begin
      icnt    <= icnt + 6'd1;
      bmode_q <= bmode;
    end
  end

  // row pass
  logic    r_valid, r_ready, r_stall, r_clip;
  pre_t    r_data;
  mode_e   r_mode;
  sample_t r_lim;

  dct_1d_unit u_row (
    .clk(clk), .rst(rst),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data), .in_mode(bmode),
    .out_valid(r_valid), .out_ready(r_ready), .out_data(r_data), .out_mode(r_mode),
    .stall(r_stall)
  );

  dct_limiter #(.IN_W(PRE_W), .OUT_W(DATA_W)) u_lim_row (
    .din(r_data), .dout(r_lim), .clipped(r_clip)
  );

  // transpose memory
  logic       t_valid, t_ready, t_both_full;
  sample_t    t_data;
  mode_e      t_mode;
  logic [1:0] ram_we;
  logic [5:0] ram_waddr, ram_raddr;
  sample_t    ram_rdata [2];

  transpose_addr_gen u_tag (
    .clk(clk), .rst(rst),
    .in_valid(r_valid), .in_ready(r_ready), .in_mode(r_mode),
    .out_valid(t_valid), .out_ready(t_ready), .out_data(t_data), .out_mode(t_mode),
    .ram_we(ram_we), .ram_waddr(ram_waddr),
    .ram_raddr(ram_raddr), .ram_rdata(ram_rdata), .both_full(t_both_full)
  );

  for (genvar b = 0; b < 2; b++) begin : g_bank
    transpose_ram #(.DEPTH(64), .W(DATA_W)) u_ram (
      .clk(clk), .we(ram_we[b]), .waddr(ram_waddr), .wdata(r_lim),
      .raddr(ram_raddr), .rdata(ram_rdata[b])
    );
  end

  // column pass
  logic  c_stall, c_clip;
  pre_t  c_data;
  mode_e c_mode;

  dct_1d_unit u_col (
    .clk(clk), .rst(rst),
    .in_valid(t_valid), .in_ready(t_ready), .in_data(t_data), .in_mode(t_mode),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(c_data), .out_mode(c_mode),
    .stall(c_stall)
  );

  dct_limiter #(.IN_W(PRE_W), .OUT_W(DATA_W)) u_lim_col (
    .din(c_data), .dout(out_data), .clipped(c_clip)
  );

  assign out_mode = c_mode;
  assign events   = {t_both_full, c_clip && out_valid, r_clip && r_valid, c_stall, r_stall};
endmodule

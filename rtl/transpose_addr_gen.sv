// transpose_addr_gen: row/column address generator and bank control of the
// transpose memory.
//
// Two transpose_ram banks are used in ping-pong. The row pass writes its
// results into the write bank in arrival order, which is row-major: the word
// of row r, column c goes to address 8r + c. When 64 words are in, the bank is
// marked full and writing continues in the other bank. The column pass reads a
// full bank column by column: read number t (t = 8c + r) takes address 8r + c,
// i.e. the counter with its two 3-bit halves swapped. When 64 words are out
// the bank is free again. Because writing one bank and reading the other
// proceed at the same time, the row pass of block n+1 overlaps the column pass
// of block n. The transform direction of each block travels with it in a
// per-bank flag, taken from the first word written.
//
// Interface: valid/ready on both sides. in_ready is low while the write bank
// is still full (the row pass then stalls); out_valid is high while the read
// bank is full. The RAM address and enable ports are brought out so the banks
// sit beside it; the write data go from the row pass straight to the banks,
// and the read data of the current read bank are selected here.
// Synchronous, active-high reset (both banks empty).
module transpose_addr_gen
  import dct_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // from the row pass
  input  logic        in_valid,
  output logic        in_ready,
  input  mode_e       in_mode,
  // to the column pass
  output logic        out_valid,
  input  logic        out_ready,
  output sample_t     out_data,
  output mode_e       out_mode,
  // to the two RAM banks
  output logic [1:0]  ram_we,
  output logic [5:0]  ram_waddr,
  output logic [5:0]  ram_raddr,
  input  sample_t     ram_rdata [2],
  output logic        both_full      // both banks hold unread blocks
);
  logic [1:0] full;
  logic       wb, rb;          // write bank, read bank
  logic [5:0] wcnt, rcnt;
  mode_e      bmode [2];

  logic wr, rd;

  assign in_ready  = !full[wb];
  assign wr        = in_valid && in_ready;
  assign out_valid = full[rb];
  assign both_full = &full;
  assign rd        = out_valid && out_ready;

  always_comb begin
    ram_we        = '0;
    ram_we[wb]    = wr;
  end
  assign ram_waddr = wcnt;
  assign ram_raddr = {rcnt[2:0], rcnt[5:3]};
  assign out_data  = ram_rdata[rb];
  assign out_mode  = bmode[rb];

  always_ff @(posedge clk) begin
    if (rst) begin
      full  <= '0;
      wb    <= 1'b0;
      rb    <= 1'b0;
      wcnt  <= '0;
      rcnt  <= '0;
      bmode <= '{MODE_DCT, MODE_DCT};
    end else begin
      if (wr) begin
        if (wcnt == 6'd0) bmode[wb] <= in_mode;
        wcnt <= wcnt + 6'd1;
        if (wcnt == 6'd63) begin
          full[wb] <= 1'b1;
          wb       <= ~wb;
        end
      end
      if (rd) begin
        rcnt <= rcnt + 6'd1;
        if (rcnt == 6'd63) begin
          full[rb] <= 1'b0;
          rb       <= ~rb;
        end
      end
    end
  end

  // A bank is never written while full and never read while empty.
  a_no_write_full: assert property (@(posedge clk) disable iff (rst)
    wr |-> !full[wb]);
  a_no_read_empty: assert property (@(posedge clk) disable iff (rst)
    rd |-> full[rb]);
endmodule

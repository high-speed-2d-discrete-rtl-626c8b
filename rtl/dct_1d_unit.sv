// dct_1d_unit: 8-point 1-D DCT/IDCT processing unit using distributed
// arithmetic (no multipliers).
//
// Dataflow, one 8-sample vector at a time:
//   1. Input register (pre-processor): samples arrive one per handshake and
//      are collected into an 8-word register; the direction (in_mode) is taken
//      from the first sample of the vector.
//   2. dct_preproc forms the eight 17-bit operands in parallel (forward: the
//      butterfly sums and differences; inverse: even/odd regrouping), and they
//      are loaded into parallel-in/serial-out shift registers.
//   3. For OP_W = 17 cycles the shift registers present one bit of every
//      operand, most significant first. Each of the eight da_rom tables is
//      addressed by the current bit of the four operands of its half, and its
//      da_accumulator doubles and adds (subtracts on the sign bit). All eight
//      outputs are computed in parallel, one accumulator per output.
//   4. dct_postproc applies the inverse output butterfly (inverse mode) and
//      rounds; the eight results go into an output register and leave one per
//      handshake, in index order 0..7.
// The input register fills while the DA engine works on the previous vector,
// and the output register drains while the engine works on the next one. The
// engine stalls (holds its results) while the output register still holds
// undelivered words.
//
// Timing with a continuous input and an always-ready output: one vector every
// OP_W + 1 = 18 cycles; the first result of a vector is valid OP_W + 2 = 19
// cycles after its last sample was accepted.
//
// Interface: valid/ready in and out, results PRE_W bits wide (to be limited
// to 16 bits by dct_limiter), out_mode is the direction of the vector being
// output. Synchronous, active-high reset.
// The serial sample interface, the parallel accumulators and the handshakes
// are this design's choices; the butterfly, ROM and accumulator scheme follow
// the Chen/DA structure.
module dct_1d_unit
  import dct_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t in_data,
  input  mode_e   in_mode,
  output logic    out_valid,
  input  logic    out_ready,
  output pre_t    out_data,
  output mode_e   out_mode,
  output logic    stall        // DA results held because the output is busy
);
  // ---- input register ----------------------------------------------------
  sample_t    sreg [N];
  logic [3:0] scnt;
  mode_e      smode;
  logic       in_acc;

  assign in_ready = (scnt != 4'(N));
  assign in_acc   = in_valid && in_ready;

  // ---- DA engine ---------------------------------------------------------
  operand_t   opnd_in [N];
  operand_t   opnd    [N];
  logic       busy;
  logic [4:0] bitcnt;
  mode_e      emode;
  logic       res_pending;     // accumulators hold a finished vector
  logic       start, res_move;

  rom_word_t  rom_q [N];
  acc_t       acc_q [N];
  pre_t       post_q [N];

  // ---- output register ---------------------------------------------------
  pre_t       oreg [N];
  logic [2:0] ocnt;
  logic       obusy;
  mode_e      omode;
  logic       out_acc;

  assign out_acc   = out_valid && out_ready;
  assign out_valid = obusy;
  assign out_data  = oreg[ocnt];
  assign out_mode  = omode;

  assign res_move = res_pending && (!obusy || (out_acc && ocnt == 3'(N - 1)));
  assign start    = (scnt == 4'(N)) && !busy && (!res_pending || res_move);
  assign stall    = res_pending && !res_move;

  dct_preproc u_pre (.mode(smode), .x(sreg), .op(opnd_in));

  for (genvar r = 0; r < N; r++) begin : g_da
    logic [3:0] addr;
    // ROM r < 4 reads operands 0..3, ROM r >= 4 reads operands 4..7
    for (genvar k = 0; k < 4; k++) begin : g_bit
      assign addr[k] = opnd[(r / 4) * 4 + k][OP_W-1];
    end
    da_rom #(.ROW(r)) u_rom (.mode(emode), .addr(addr), .data(rom_q[r]));
    da_accumulator u_acc (
      .clk(clk), .rst(rst), .en(busy), .first(bitcnt == 5'd0),
      .rom(rom_q[r]), .acc(acc_q[r])
    );
  end

  dct_postproc u_post (.mode(emode), .acc(acc_q), .y(post_q));

  always_ff @(posedge clk) begin
    if (rst) begin
      scnt        <= '0;
      smode       <= MODE_DCT;
      busy        <= 1'b0;
      bitcnt      <= '0;
      emode       <= MODE_DCT;
      res_pending <= 1'b0;
      ocnt        <= '0;
      obusy       <= 1'b0;
      omode       <= MODE_DCT;
      for (int i = 0; i < N; i++) begin
        sreg[i] <= '0;
        opnd[i] <= '0;
        oreg[i] <= '0;
      end
    end else begin
      // input register
      if (start) scnt <= '0;
      if (in_acc) begin
        sreg[scnt[2:0]] <= in_data;
        if (scnt == 4'd0) smode <= in_mode;
        scnt <= scnt + 4'd1;
      end

      // DA engine
      if (start) begin
        opnd   <= opnd_in;
        emode  <= smode;
        busy   <= 1'b1;
        bitcnt <= '0;
      end else if (busy) begin
        for (int i = 0; i < N; i++) opnd[i] <= opnd[i] <<< 1;
        bitcnt <= bitcnt + 5'd1;
        if (bitcnt == 5'(OP_W - 1)) begin
          busy        <= 1'b0;
          res_pending <= 1'b1;
        end
      end
      if (res_move) res_pending <= 1'b0;

      // output register
      if (out_acc) begin
        ocnt <= ocnt + 3'd1;
        if (ocnt == 3'(N - 1)) obusy <= 1'b0;
      end
      if (res_move) begin
        oreg  <= post_q;
        omode <= emode;
        obusy <= 1'b1;
        ocnt  <= '0;
      end
    end
  end

  // Handshake rules: a held result stays stable until it is taken.
  a_out_stable: assert property (@(posedge clk) disable iff (rst)
    out_valid && !out_ready |=> out_valid && $stable(out_data));
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
    start |-> !busy);
endmodule

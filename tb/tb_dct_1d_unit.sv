// tb_dct_1d_unit: random 8-sample vectors through one 1-D DCT/IDCT unit, the
// direction alternating at random from vector to vector. Each result must be
// within 1 of the real-valued transform rounded to an integer (inputs are kept
// within +-4096, where the fixed-point constants cost well under half an LSB).
// Phase 1 streams vectors with the output always ready and checks the timing:
// one vector per 18 cycles, and the first result of a vector presented 19
// cycles after the clock edge that accepted its last sample. Phase 2 throttles the output at random, which
// makes the DA engine hold its results (counted; the phase must produce some).
module tb_dct_1d_unit;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  logic    clk = 0, rst = 1;
  logic    in_valid = 0, in_ready, out_valid, out_ready = 0, stall;
  sample_t in_data = '0;
  mode_e   in_mode = MODE_DCT, out_mode;
  pre_t    out_data;
  int checks = 0, failures = 0;
  int cycle = 0;

  dct_1d_unit dut (
    .clk(clk), .rst(rst),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data), .in_mode(in_mode),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data), .out_mode(out_mode),
    .stall(stall)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  localparam int NV = 400;
  int   exp_q [NV][8];
  bit   mode_q [NV];
  int   last_in_cycle [NV];
  int   first_out_cycle [NV];
  int   nstall = 0;
  bit   throttle = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results
  initial begin
    for (int v = 0; v < NV; v++) begin
      vec_t x, y;
      mode_q[v] = 1'($urandom_range(0, 1));
      for (int i = 0; i < 8; i++) x[i] = real'($signed($urandom_range(0, 8192)) - 4096);
      y = xform(mode_q[v], x);
      for (int i = 0; i < 8; i++) begin
        exp_q[v][i] = round_clamp(y[i]);
      end
      for (int i = 0; i < 8; i++) inputs[v][i] = int'(x[i]);
    end
  end
  int inputs [NV][8];

  // driver: continuous input
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int v = 0; v < NV; v++) begin
      for (int i = 0; i < 8; i++) begin
        in_valid <= 1;
        in_data  <= sample_t'(inputs[v][i]);
        in_mode  <= mode_e'(mode_q[v]);
        @(posedge clk iff in_ready);
      end
    end
    in_valid <= 0;
  end

  // output side
  // handshake monitor: cycle of the last sample of each input vector and of
  // the first result of each output vector
  int nin = 0, nout = 0;
  always @(posedge clk) begin
    if (!rst && in_valid && in_ready) begin
      if (nin % 8 == 7) last_in_cycle[nin / 8] = cycle;
      nin++;
    end
    if (!rst && out_valid && out_ready) begin
      if (nout % 8 == 0) first_out_cycle[nout / 8] = cycle;
      nout++;
    end
  end

  always @(posedge clk) begin
    if (!rst) out_ready <= throttle ? ($urandom_range(0, 3) == 0) : 1'b1;
    if (!rst && stall) nstall++;
  end

  initial begin
    int prev_first;
    @(negedge rst);
    for (int v = 0; v < NV; v++) begin
      if (v == NV / 2) throttle = 1;
      for (int i = 0; i < 8; i++) begin
        @(posedge clk iff (out_valid && out_ready));
        checks++;
        if (int'(out_data) > exp_q[v][i] + 1 || int'(out_data) < exp_q[v][i] - 1 || out_mode != mode_e'(mode_q[v])) begin
          failures++;
          if (failures < 10)
            $display("FAIL vec %0d idx %0d mode %0d: got %0d exp %0d", v, i, mode_q[v], out_data, exp_q[v][i]);
        end
      end
      // timing in the unthrottled phase
      if (v > 0 && v < NV / 2 - 1) begin
        checks++;
        if (first_out_cycle[v] - first_out_cycle[v-1] != OP_W + 1) begin
          failures++;
          $display("FAIL vector period %0d", first_out_cycle[v] - first_out_cycle[v-1]);
        end
      end
      if (v == 0) begin
        checks++;
        // result valid OP_W + 2 cycles after the accepting edge, taken one edge later
        if (first_out_cycle[0] - last_in_cycle[0] != OP_W + 3) begin
          failures++;
          $display("FAIL latency %0d", first_out_cycle[0] - last_in_cycle[0]);
        end
      end
    end
    checks++;
    if (nstall == 0) begin
      failures++;
      $display("FAIL the engine never stalled");
    end
    $display("stall cycles: %0d", nstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dct2d_top: end-to-end test of the 8x8 2-D DCT/IDCT processor at its
// default (and only) configuration.
//
// A sequence of blocks is streamed through the processor:
//   - forward blocks of random 8-bit pixels (0..255 and -128..127),
//   - inverse blocks whose input is the rounded exact 2-D DCT of a random
//     pixel block (their result must also come back within 2 of the pixels),
//   - forward and inverse blocks of large values, which saturate the limiters
//     of both passes,
// with the direction changing from block to block. Expected results come from
// the real-valued reference in dct_ref_pkg (rounding and 16-bit saturation
// after each pass, as in the hardware); outputs are compared within 2 (normal
// blocks) or 24 (saturating blocks, where the 14-bit constants cost more).
// Output order is column-major: output 8v+u of a block is Z[u][v].
//
// Phase 1 (first blocks): continuous input and an always-ready output; the
// block period in steady state must be 8 x 18 = 144 cycles. Phase 2: the
// output is throttled at random, so the column pass stalls, both transpose
// banks fill, the row pass stalls and the input is held off.
// Mechanisms counted (each must occur): row-pass stall, column-pass stall,
// row limiter saturation, column limiter saturation, both transpose banks
// full, input held off, direction switch between consecutive blocks.
module tb_dct2d_top;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  logic    clk = 0, rst = 1;
  logic    mode = 0, in_valid = 0, in_ready, out_valid, out_ready = 0, out_mode;
  sample_t in_data = '0, out_data;
  logic [4:0] events;
  int checks = 0, failures = 0;
  int cycle = 0;

  dct2d_top dut (
    .clk(clk), .rst(rst), .mode(mode),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data),
    .out_mode(out_mode), .events(events)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  localparam int NB  = 40;
  localparam int NP1 = 10;          // blocks of the unthrottled phase
  blk_t in_q  [NB];
  blk_t exp_q [NB];
  blk_t pix_q [NB];
  bit   inv_q [NB];
  bit   big_q [NB];
  bit   rt_q  [NB];               // inverse of a known pixel block
  int   first_out [NB];
  bit   throttle = 0;

  int n_rstall = 0, n_cstall = 0, n_rclip = 0, n_cclip = 0;
  int n_bothfull = 0, n_inhold = 0, n_switch = 0;
  int max_err = 0, max_rt_err = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // block generation
  initial begin
    for (int b = 0; b < NB; b++) begin
      int kind;
      blk_t p;
      kind = (b < NP1) ? b % 4 : $urandom_range(0, 5);
      inv_q[b] = 0; big_q[b] = 0; rt_q[b] = 0;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          p[r][c] = (kind == 1) ? $signed($urandom_range(0, 255)) - 128 : $urandom_range(0, 255);
      case (kind)
        0, 1, 4: in_q[b] = p;
        2, 5: begin                       // inverse of the exact DCT of p
          in_q[b]  = ref2d(1'b0, p);
          inv_q[b] = 1;
          rt_q[b]  = 1;
        end
        default: begin                    // saturating block
          big_q[b] = 1;
          inv_q[b] = (b % 2 == 1);
          for (int r = 0; r < 8; r++)
            for (int c = 0; c < 8; c++)
              in_q[b][r][c] = $signed($urandom_range(0, 4000)) + ((b % 4 < 2) ? 28000 : -32000);
        end
      endcase
      pix_q[b] = p;
      exp_q[b] = ref2d(inv_q[b], in_q[b]);
    end
  end

  // driver
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int b = 0; b < NB; b++) begin
      for (int t = 0; t < 64; t++) begin
        in_valid <= 1;
        in_data  <= sample_t'(in_q[b][t / 8][t % 8]);
        mode     <= inv_q[b];
        @(posedge clk iff in_ready);
      end
    end
    in_valid <= 0;
  end

  // mechanism monitor
  int nout = 0;
  always @(posedge clk) begin
    if (!rst) begin
      out_ready <= throttle ? ($urandom_range(0, 5) == 0) : 1'b1;
      if (events[0]) n_rstall++;
      if (events[1]) n_cstall++;
      if (events[2]) n_rclip++;
      if (events[3]) n_cclip++;
      if (events[4]) n_bothfull++;
      if (in_valid && !in_ready) n_inhold++;
      if (out_valid && out_ready) begin
        if (nout % 64 == 0) first_out[nout / 64] = cycle;
        nout++;
      end
    end
  end

  // checker
  initial begin
    @(negedge rst);
    for (int b = 0; b < NB; b++) begin
      int tol;
      tol = big_q[b] ? 24 : 2;
      if (b == NP1) throttle = 1;
      for (int t = 0; t < 64; t++) begin
        int u, v, e, d;
        @(posedge clk iff (out_valid && out_ready));
        v = t / 8;
        u = t % 8;
        e = exp_q[b][u][v];
        d = int'(out_data) - e;
        if (d < 0) d = -d;
        if (d > max_err && !big_q[b]) max_err = d;
        checks++;
        if (d > tol || out_mode != inv_q[b]) begin
          failures++;
          if (failures < 10)
            $display("FAIL block %0d (inv %0d) Z[%0d][%0d]: got %0d exp %0d", b, inv_q[b], u, v, out_data, e);
        end
        if (rt_q[b]) begin
          d = int'(out_data) - pix_q[b][u][v];
          if (d < 0) d = -d;
          if (d > max_rt_err) max_rt_err = d;
          checks++;
          if (d > 2) begin
            failures++;
            if (failures < 10) $display("FAIL round trip block %0d: got %0d pixel %0d", b, out_data, pix_q[b][u][v]);
          end
        end
      end
      if (b > 0 && inv_q[b] != inv_q[b-1]) n_switch++;
      // steady-state block period of the unthrottled phase
      if (b >= 2 && b < NP1 - 1) begin
        checks++;
        if (first_out[b] - first_out[b-1] != 8 * (OP_W + 1)) begin
          failures++;
          $display("FAIL block period %0d", first_out[b] - first_out[b-1]);
        end
      end
    end
    $display("first block out after %0d cycles, block period %0d cycles",
             first_out[0], first_out[3] - first_out[2]);
    $display("max error %0d, max round-trip error %0d", max_err, max_rt_err);
    $display("row stalls %0d, column stalls %0d, row clips %0d, column clips %0d",
             n_rstall, n_cstall, n_rclip, n_cclip);
    $display("both banks full %0d, input held %0d, direction switches %0d",
             n_bothfull, n_inhold, n_switch);
    checks += 7;
    if (n_rstall == 0)   begin failures++; $display("FAIL no row-pass stall"); end
    if (n_cstall == 0)   begin failures++; $display("FAIL no column-pass stall"); end
    if (n_rclip == 0)    begin failures++; $display("FAIL no row saturation"); end
    if (n_cclip == 0)    begin failures++; $display("FAIL no column saturation"); end
    if (n_bothfull == 0) begin failures++; $display("FAIL transpose banks never both full"); end
    if (n_inhold == 0)   begin failures++; $display("FAIL input never held off"); end
    if (n_switch == 0)   begin failures++; $display("FAIL no direction switch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_image_codec: image-compression workload. A 512x512 8-bit test image
// (4096 blocks, generated here: smooth shading, sharp edges, fine texture
// and noise) goes through the processor in forward mode with the JPEG level
// shift (pixel - 128). Its coefficients are quantised and dequantised with
// the JPEG luminance table (quality 50), and the result goes back through the
// processor in inverse mode. The reconstruction is compared with the same
// chain computed in real arithmetic (exact DCT, same quantisation, exact
// IDCT, rounding):
//   - the mean square error of the hardware chain against the original
//     image must be within 5% of the real-arithmetic chain's;
//   - at most 1% of the quantised coefficients may differ from the
//     real-arithmetic ones (a coefficient near a quantiser decision level can
//     round the other way);
//   - every block must take 144 cycles in steady state (continuous input,
//     always-ready output), in both directions.
// MSE and PSNR of both chains are printed.
module tb_image_codec;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int W  = 512;
  localparam int NB = (W / 8) * (W / 8);

  logic    clk = 0, rst = 1;
  logic    mode = 0, in_valid = 0, in_ready, out_valid, out_ready = 1, out_mode;
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

  // JPEG luminance quantisation table (quality 50), row-major
  localparam int QT [64] = '{
    16, 11, 10, 16,  24,  40,  51,  61,
    12, 12, 14, 19,  26,  58,  60,  55,
    14, 13, 16, 24,  40,  57,  69,  56,
    14, 17, 22, 29,  51,  87,  80,  62,
    18, 22, 37, 56,  68, 109, 103,  77,
    24, 35, 55, 64,  81, 104, 113,  92,
    49, 64, 78, 87, 103, 121, 120, 101,
    72, 92, 95, 98, 112, 100, 103,  99};

  byte unsigned img  [W][W];
  byte unsigned hw_rec [W][W];
  byte unsigned sw_rec [W][W];
  int  coef_hw [NB][64];          // dequantised hardware coefficients, row-major
  int  q_diff = 0;
  int  first_out [2][NB];

  function automatic int quant(real c, int q);
    return int'($floor(c / q + 0.5));
  endfunction

  function automatic int clamp8(real v);
    real r;
    r = $floor(v + 0.5);
    return (r < 0.0) ? 0 : (r > 255.0) ? 255 : int'(r);
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // test image and the real-arithmetic chain
  initial begin
    for (int y = 0; y < W; y++)
      for (int x = 0; x < W; x++) begin
        real v;
        v = 110.0 + 70.0 * $sin(x / 37.0) * $cos(y / 53.0) + 0.08 * (x - y);
        if ((x - 256) * (x - 256) + (y - 200) * (y - 200) < 90 * 90) v += 45.0;
        if (x > 380 && y > 330) v = 30.0 + 25.0 * ((x / 4 + y / 4) % 2);
        v += $itor($urandom_range(0, 12)) - 6.0;
        img[y][x] = 8'(clamp8(v));
      end
    for (int b = 0; b < NB; b++) begin
      int by, bx;
      vec_t t [8];
      vec_t v, w;
      real z [8][8];
      by = (b / (W / 8)) * 8;
      bx = (b % (W / 8)) * 8;
      for (int r = 0; r < 8; r++) begin
        for (int c = 0; c < 8; c++) v[c] = real'(int'(img[by + r][bx + c]) - 128);
        t[r] = dct8(v);
      end
      for (int c = 0; c < 8; c++) begin
        for (int r = 0; r < 8; r++) v[r] = t[r][c];
        w = dct8(v);
        for (int r = 0; r < 8; r++) z[r][c] = real'(quant(w[r], QT[8*r + c]) * QT[8*r + c]);
      end
      for (int r = 0; r < 8; r++) begin
        for (int c = 0; c < 8; c++) v[c] = z[r][c];
        t[r] = idct8(v);
      end
      for (int c = 0; c < 8; c++) begin
        for (int r = 0; r < 8; r++) v[r] = t[r][c];
        w = idct8(v);
        for (int r = 0; r < 8; r++) sw_rec[by + r][bx + c] = 8'(clamp8(w[r] + 128.0));
      end
    end
  end

  // real-arithmetic quantised coefficient, for the comparison
  function automatic int sw_q(int b, int u, int v);
    vec_t t [8];
    vec_t x, w;
    int by, bx;
    by = (b / (W / 8)) * 8;
    bx = (b % (W / 8)) * 8;
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) x[c] = real'(int'(img[by + r][bx + c]) - 128);
      t[r] = dct8(x);
    end
    for (int r = 0; r < 8; r++) x[r] = t[r][v];
    w = dct8(x);
    return quant(w[u], QT[8*u + v]);
  endfunction

  // driver: forward pass over all blocks, then inverse pass
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int b = 0; b < NB; b++) begin
      int by, bx;
      by = (b / (W / 8)) * 8;
      bx = (b % (W / 8)) * 8;
      for (int t = 0; t < 64; t++) begin
        in_valid <= 1;
        mode     <= 0;
        in_data  <= sample_t'(int'(img[by + t / 8][bx + t % 8]) - 128);
        @(posedge clk iff in_ready);
      end
    end
    in_valid <= 0;
    wait (fwd_done);
    for (int b = 0; b < NB; b++) begin
      for (int t = 0; t < 64; t++) begin
        in_valid <= 1;
        mode     <= 1;
        in_data  <= sample_t'(coef_hw[b][t]);
        @(posedge clk iff in_ready);
      end
    end
    in_valid <= 0;
  end

  bit fwd_done = 0;
  initial begin
    real mse_hw, mse_sw, psnr_hw, psnr_sw;
    @(negedge rst);
    for (int b = 0; b < NB; b++) begin
      for (int t = 0; t < 64; t++) begin
        int u, v, q;
        @(posedge clk iff (out_valid && out_ready));
        if (t == 0) first_out[0][b] = cycle;
        v = t / 8;
        u = t % 8;
        q = quant(real'(out_data), QT[8*u + v]);
        coef_hw[b][8*u + v] = q * QT[8*u + v];
        if (b % 16 == 0 && q != sw_q(b, u, v)) q_diff++;
        if (out_mode != 1'b0) failures++;
      end
    end
    fwd_done = 1;
    for (int b = 0; b < NB; b++) begin
      int by, bx;
      by = (b / (W / 8)) * 8;
      bx = (b % (W / 8)) * 8;
      for (int t = 0; t < 64; t++) begin
        int p;
        @(posedge clk iff (out_valid && out_ready));
        if (t == 0) first_out[1][b] = cycle;
        p = int'(out_data) + 128;
        hw_rec[by + t % 8][bx + t / 8] = 8'((p < 0) ? 0 : (p > 255) ? 255 : p);
        if (out_mode != 1'b1) failures++;
      end
    end
    // block period in steady state
    for (int d = 0; d < 2; d++)
      for (int b = 2; b < NB; b++) begin
        checks++;
        if (first_out[d][b] - first_out[d][b-1] != 144) begin
          failures++;
          if (failures < 10) $display("FAIL pass %0d block %0d period %0d", d, b, first_out[d][b] - first_out[d][b-1]);
        end
      end
    mse_hw = 0.0;
    mse_sw = 0.0;
    for (int y = 0; y < W; y++)
      for (int x = 0; x < W; x++) begin
        real e;
        e = real'(int'(hw_rec[y][x]) - int'(img[y][x]));
        mse_hw += e * e;
        e = real'(int'(sw_rec[y][x]) - int'(img[y][x]));
        mse_sw += e * e;
      end
    mse_hw /= real'(W * W);
    mse_sw /= real'(W * W);
    psnr_hw = 10.0 * $log10(255.0 * 255.0 / mse_hw);
    psnr_sw = 10.0 * $log10(255.0 * 255.0 / mse_sw);
    $display("real-arithmetic chain: MSE %f PSNR %f dB", mse_sw, psnr_sw);
    $display("hardware chain:        MSE %f PSNR %f dB", mse_hw, psnr_hw);
    $display("quantised coefficients differing (every 16th block): %0d of %0d", q_diff, (NB / 16) * 64);
    checks++;
    if (mse_hw > 1.05 * mse_sw || mse_hw < 0.95 * mse_sw) begin
      failures++;
      $display("FAIL hardware MSE not within 5%% of the real-arithmetic MSE");
    end
    checks++;
    if (q_diff * 100 > (NB / 16) * 64) begin
      failures++;
      $display("FAIL too many quantised coefficients differ");
    end
    $display("cycles in total: %0d for %0d blocks in each direction", cycle, NB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// dct_postproc: output stage of the 1-D DCT/IDCT unit.
//
// Input acc[0..3] are the even-half DA results and acc[4..7] the odd-half ones,
// all with COEF_FRAC fraction bits.
// Forward transform: the results are already the coefficients, only reordered,
//   y[2j] = acc[j], y[2j+1] = acc[4+j].
// Inverse transform: the Chen output butterfly,
//   y[j] = acc[j] + acc[4+j], y[7-j] = acc[j] - acc[4+j]   (j = 0..3).
// Every result is then rounded to an integer (add half an LSB, shift right
// arithmetically by COEF_FRAC) and given PRE_W bits; the limiter that follows
// brings it to 16 bits. Combinational.
module dct_postproc
  import dct_pkg::*;
(
  input  mode_e mode,
  input  acc_t  acc [N],
  output pre_t  y   [N]
);
  localparam int W = ACC_W + 1;

  function automatic pre_t rnd(logic signed [W-1:0] v);
    logic signed [W-1:0] t;
    t = v + (W'(1) <<< (COEF_FRAC - 1));
    return pre_t'(t >>> COEF_FRAC);
  endfunction

  pre_t yd [N];   // forward results
  pre_t yi [N];   // inverse results

  for (genvar j = 0; j < 4; j++) begin : g_bfly
    assign yd[2*j]     = rnd(W'(acc[j]));
    assign yd[2*j + 1] = rnd(W'(acc[4 + j]));
    assign yi[j]       = rnd(W'(acc[j]) + W'(acc[4 + j]));
    assign yi[7 - j]   = rnd(W'(acc[j]) - W'(acc[4 + j]));
  end

  for (genvar i = 0; i < N; i++) begin : g_sel
    assign y[i] = (mode == MODE_DCT) ? yd[i] : yi[i];
  end
endmodule

// dct_ref_pkg: real-arithmetic reference models for the testbenches of the
// DCT/IDCT processor, written from the cosine definition of the transform
// (independent of the fixed-point Chen constants used by the RTL).
//   dct8 / idct8     orthonormal 8-point DCT-II and its inverse
//   round_clamp      half-up rounding to an integer and 16-bit saturation,
//                    as done after each pass of the hardware
//   ref2d            one full 2-D pass pair on an 8x8 block, with rounding and
//                    saturation between the passes
package dct_ref_pkg;
  localparam real PI = 3.14159265358979323846;

  typedef real vec_t [8];
  typedef int  blk_t [8][8];

  function automatic real ck(int k);
    return (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  function automatic vec_t dct8(vec_t x);
    vec_t y;
    for (int k = 0; k < 8; k++) begin
      y[k] = 0.0;
      for (int m = 0; m < 8; m++) y[k] += x[m] * $cos((2*m + 1) * k * PI / 16.0);
      y[k] *= 0.5 * ck(k);
    end
    return y;
  endfunction

  function automatic vec_t idct8(vec_t x);
    vec_t y;
    for (int m = 0; m < 8; m++) begin
      y[m] = 0.0;
      for (int k = 0; k < 8; k++) y[m] += 0.5 * ck(k) * x[k] * $cos((2*m + 1) * k * PI / 16.0);
    end
    return y;
  endfunction

  function automatic int round_clamp(real v);
    real r;
    r = $floor(v + 0.5);
    if (r > 32767.0)  return 32767;
    if (r < -32768.0) return -32768;
    return int'(r);
  endfunction

  function automatic vec_t xform(bit inverse, vec_t x);
    return inverse ? idct8(x) : dct8(x);
  endfunction

  // z[u][v]: 2-D result, rows first then columns
  function automatic blk_t ref2d(bit inverse, blk_t x);
    blk_t t, z;
    vec_t v, w;
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) v[c] = real'(x[r][c]);
      w = xform(inverse, v);
      for (int c = 0; c < 8; c++) t[r][c] = round_clamp(w[c]);
    end
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) v[r] = real'(t[r][c]);
      w = xform(inverse, v);
      for (int r = 0; r < 8; r++) z[r][c] = round_clamp(w[r]);
    end
    return z;
  endfunction
endpackage

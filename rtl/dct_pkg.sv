// dct_pkg: constants, types and coefficient tables shared by the 8x8 DCT/IDCT
// processor.
//
// The transform is the orthonormal 8-point DCT-II, X(k) = 1/2 C(k) sum_m x(m)
// cos((2m+1)k*pi/16), with C(0) = 1/sqrt(2) and C(k) = 1 otherwise. Two such 1-D
// passes give the 2-D transform with the overall factor 1/4 C(u) C(v). Chen's
// factorisation splits it into an even half (X0, X2, X4, X6 from the sums
// x(i)+x(7-i)) and an odd half (X1, X3, X5, X7 from the differences), each a 4x4
// matrix over the seven constants A..G below. The inverse uses the transposed
// matrices followed by an output butterfly.
//
// The constants are held in two's complement with COEF_FRAC = 14 fraction bits
// (a width this design chooses); each is round(2^14 * value):
//   A = cos(pi/4)/2, B = cos(pi/8)/2, C = sin(pi/8)/2, D = cos(pi/16)/2,
//   E = cos(3pi/16)/2, F = sin(3pi/16)/2, G = sin(pi/16)/2.
// The distributed-arithmetic ROM contents are derived from them by rom_word().
package dct_pkg;

  localparam int N         = 8;              // transform length (8x8 blocks)
  localparam int DATA_W    = 16;             // sample / coefficient word width
  localparam int OP_W      = DATA_W + 1;     // butterfly output width = DA bit count
  localparam int COEF_FRAC = 14;             // fraction bits of the ROM words
  localparam int ROM_W     = 16;             // ROM word width
  localparam int ACC_W     = 32;             // shift-accumulator width
  localparam int PRE_W     = 20;             // rounded result width before the limiter

  localparam int signed CA = 5793;
  localparam int signed CB = 7568;
  localparam int signed CC = 3135;
  localparam int signed CD = 8035;
  localparam int signed CE = 6811;
  localparam int signed CF = 4551;
  localparam int signed CG = 1598;

  typedef enum logic {
    MODE_DCT  = 1'b0,
    MODE_IDCT = 1'b1
  } mode_e;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [OP_W-1:0]   operand_t;
  typedef logic signed [ROM_W-1:0]  rom_word_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic signed [PRE_W-1:0]  pre_t;

  // Coefficient that multiplies operand k (0..3) in DA row r (0..3 even half,
  // 4..7 odd half). Even rows of the forward transform give X0, X2, X4, X6 from
  // the butterfly sums; in the inverse they give the even parts e0..e3 from
  // X0, X2, X4, X6. Odd rows give X1, X3, X5, X7 (forward) or o0..o3 (inverse);
  // that matrix is symmetric, so both directions share it.
  function automatic int signed coef(mode_e mode, int r, int k);
    int signed m [4][4];
    if (r < 4) begin
      if (mode == MODE_DCT) begin
        m = '{'{ CA,  CA,  CA,  CA},
              '{ CB,  CC, -CC, -CB},
              '{ CA, -CA, -CA,  CA},
              '{ CC, -CB,  CB, -CC}};
      end else begin
        m = '{'{ CA,  CB,  CA,  CC},
              '{ CA,  CC, -CA, -CB},
              '{ CA, -CC, -CA,  CB},
              '{ CA, -CB,  CA, -CC}};
      end
      return m[r][k];
    end else begin
      m = '{'{ CD,  CE,  CF,  CG},
            '{ CE, -CG, -CD, -CF},
            '{ CF, -CD,  CG,  CE},
            '{ CG, -CF,  CE, -CD}};
      return m[r-4][k];
    end
  endfunction

  // ROM word of DA row r at address addr: the sum of the coefficients whose
  // operand bit is set (bit k of addr belongs to operand k).
  function automatic int signed rom_word(mode_e mode, int r, logic [3:0] addr);
    int signed s;
    s = 0;
    for (int k = 0; k < 4; k++)
      if (addr[k]) s += coef(mode, r, k);
    return s;
  endfunction

endpackage

// dct_preproc: input butterfly / rearrangement of the 1-D DCT/IDCT unit.
//
// Forward transform (mode = MODE_DCT), the Chen input butterfly:
//   op[i]   = x[i] + x[7-i]   (i = 0..3, operands of the even half)
//   op[4+i] = x[i] - x[7-i]   (operands of the odd half)
// Inverse transform (mode = MODE_IDCT), the inputs are only regrouped:
//   op[i]   = X[2i]           (X0, X2, X4, X6 -> even half)
//   op[4+i] = X[2i+1]         (X1, X3, X5, X7 -> odd half)
// Operands are one bit wider than the samples so the sums cannot overflow.
// Combinational.
module dct_preproc
  import dct_pkg::*;
(
  input  mode_e    mode,
  input  sample_t  x  [N],
  output operand_t op [N]
);
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      if (mode == MODE_DCT) begin
        op[i]     = operand_t'(x[i]) + operand_t'(x[7-i]);
        op[4 + i] = operand_t'(x[i]) - operand_t'(x[7-i]);
      end else begin
        op[i]     = operand_t'(x[2*i]);
        op[4 + i] = operand_t'(x[2*i + 1]);
      end
    end
  end
endmodule

// dct_limiter: saturates a signed IN_W-bit result to a signed OUT_W-bit word.
// Values above 2^(OUT_W-1)-1 become that maximum, values below -2^(OUT_W-1)
// become that minimum, others pass unchanged. It sits after each 1-D unit so
// that the transpose memory and the output hold 16-bit words. Combinational.
module dct_limiter #(
  parameter int IN_W  = 20,
  parameter int OUT_W = 16
) (
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout,
  output logic                    clipped
);
  localparam logic signed [IN_W-1:0] MAXV = IN_W'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [IN_W-1:0] MINV = IN_W'(-(64'sd1 <<< (OUT_W - 1)));

  always_comb begin
    clipped = 1'b1;
    if (din > MAXV)      dout = MAXV[OUT_W-1:0];
    else if (din < MINV) dout = MINV[OUT_W-1:0];
    else begin
      dout    = din[OUT_W-1:0];
      clipped = 1'b0;
    end
  end
endmodule

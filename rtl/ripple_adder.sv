// ripple_adder: W-bit ripple-carry adder built from a chain of full adders.
// sum = a + b + cin, cout is the carry out of the top bit. Purely
// combinational; its delay grows linearly with W. It is the building block of
// the groups of csel_adder32.
module ripple_adder #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_fa
    assign sum[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1]   = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end
  assign cout = c[W];
endmodule

// csel_adder32: the 32-bit adder used by the distributed-arithmetic
// shift-accumulators, a hybrid of ripple-carry and carry-select adders.
//
// The word is cut into six groups of 4, 4, 5, 6, 7 and 6 bits (LSB first). The
// lowest group is a plain ripple-carry adder fed by cin. Each higher group holds
// two ripple-carry adders, one computing with carry-in 0 and one with
// carry-in 1, and a multiplexer that picks one of them when the real carry from
// the group below arrives. The critical path is therefore the 4-bit ripple of
// the first group plus one multiplexer per higher group (4+1+1+1+1+1 stages),
// instead of a 32-bit ripple. The group sizes are the document's; the group
// boundaries are listed in GW and GOFF.
//
// Interface: sum = a + b + cin (mod 2^32), cout = carry out. Combinational.
module csel_adder32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,
  output logic [31:0] sum,
  output logic        cout
);
  localparam int NG = 6;
  localparam int GW   [NG] = '{4, 4, 5, 6, 7, 6};
  localparam int GOFF [NG] = '{0, 4, 8, 13, 19, 26};

  logic [NG:0] gc;   // carry into each group
  assign gc[0] = cin;

  ripple_adder #(.W(GW[0])) u_g0 (
    .a(a[GW[0]-1:0]), .b(b[GW[0]-1:0]), .cin(gc[0]),
    .sum(sum[GW[0]-1:0]), .cout(gc[1])
  );

  for (genvar g = 1; g < NG; g++) begin : g_sel
    localparam int LO = GOFF[g];
    localparam int HI = GOFF[g] + GW[g] - 1;
    logic [GW[g]-1:0] s0, s1;
    logic             c0, c1;
    ripple_adder #(.W(GW[g])) u_c0 (
      .a(a[HI:LO]), .b(b[HI:LO]), .cin(1'b0), .sum(s0), .cout(c0)
    );
    ripple_adder #(.W(GW[g])) u_c1 (
      .a(a[HI:LO]), .b(b[HI:LO]), .cin(1'b1), .sum(s1), .cout(c1)
    );
    assign sum[HI:LO] = gc[g] ? s1 : s0;
    assign gc[g+1]    = gc[g] ? c1 : c0;
  end

  assign cout = gc[NG];
endmodule

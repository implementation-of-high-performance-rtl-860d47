// cla4: 4-bit carry look-ahead adder.
//
// Each bit forms a generate term G_j = A_j & B_j and a propagate term
// P_j = A_j ^ B_j. All four carries are computed in two-level logic directly
// from the G/P terms and the carry input, with no ripple between bits:
//   C1 = G0 | P0.Cin
//   C2 = G1 | P1.G0 | P1.P0.Cin
//   C3 = G2 | P2.G1 | P2.P1.G0 | P2.P1.P0.Cin
//   C4 = G3 | P3.G2 | P3.P2.G1 | P3.P2.P1.G0 | P3.P2.P1.P0.Cin
// and Sum_j = P_j ^ C_j. The structure and equations follow the published
// 4-bit CLA. Combinational; the group also exports its group generate and
// propagate, unused by the multiplier but handy for a second CLA level.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout,
  output logic       group_g,
  output logic       group_p
);

  logic [3:0] g, p;
  logic [4:0] c;

  always_comb begin
    g    = a & b;
    p    = a ^ b;
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
         | (p[3] & p[2] & p[1] & p[0] & cin);
    sum     = p ^ c[3:0];
    cout    = c[4];
    group_g = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    group_p = &p;
  end

endmodule

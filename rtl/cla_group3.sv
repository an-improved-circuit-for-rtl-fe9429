// cla_group3: three-bit carry-lookahead group.
//
// From the generate (G = A.B) and propagate (P = A + B) signals of three bit
// positions and the group's carry-in c0 it forms the three carries
//   c1 = G0 + P0.c0
//   c2 = G1 + P1.G0 + P1.P0.c0
//   c3 = G2 + P2.G1 + P2.P1.G0 + P2.P1.P0.c0
// all as two-level sum-of-products, so no carry ripples inside the group.
// c3 is the carry-in of the next group. These are the document's lookahead
// equations. Purely combinational.
module cla_group3 (
  input  logic [2:0] g,
  input  logic [2:0] p,
  input  logic       c0,
  output logic [3:1] c
);

  always_comb begin
    c[1] = g[0] | (p[0] & c0);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c0);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c0);
  end

endmodule

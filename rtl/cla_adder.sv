// cla_adder: carry-lookahead adder made of three-bit lookahead groups.
//
// Each bit forms G = A.B and P = A + B. The bits are taken in groups of three
// (cla_group3); inside a group every carry is a two-level function of the
// group's carry-in, and the group's last carry is the carry-in of the next
// group, as in the document's carry equations (C3 feeds C4..C6, C6 feeds
// C7..C9). A last group with fewer than three bits is padded with G = P = 0.
// Sum bit i is (A xor B) xor C(i). The document writes the sum as P xor C with
// P = A + B; that is only right when A and B are not both 1, so the half-sum
// A xor B is used for the sum and the OR form only for the carries.
//
// Interface: WIDTH-bit a and b, carry-in cin; sum and carry-out cout.
// Purely combinational.
module cla_adder #(
  parameter int unsigned WIDTH = booth_pkg::DEFAULT_W + 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NG = (WIDTH + 2) / 3;

  logic [3*NG-1:0] g;
  logic [3*NG-1:0] p;
  logic [3*NG:0]   c;

  always_comb begin
    g = '0;
    p = '0;
    g[WIDTH-1:0] = a & b;
    p[WIDTH-1:0] = a | b;
  end

  assign c[0] = cin;

  for (genvar k = 0; k < NG; k++) begin : g_grp
    cla_group3 u_grp (
      .g  (g[3*k +: 3]),
      .p  (p[3*k +: 3]),
      .c0 (c[3*k]),
      .c  (c[3*k+1 +: 3])
    );
  end

  assign sum   = (a ^ b) ^ c[WIDTH-1:0];
  assign cout  = c[WIDTH];

endmodule

// pp_adder: one stage of the partial product adder chain.
//
// Adds the running sum to the next partial product row. Both operands are
// W+1 bit two's complement numbers aligned on the same bit weight:
//   a    the running sum with its two least significant bits removed (those
//        bits are final and go straight to the product) and sign-extended;
//   b    the partial product row from a partial product generator;
//   cin  the row's XA, which turns the inverted row ~kM into -kM.
// The W+1 bit addition is a carry-lookahead adder (cla_adder). The result is
// returned W+2 bits wide: bit W+1 is the true sign, a[W] xor b[W] xor the
// adder's carry-out, so the sum cannot overflow. The next stage drops the two
// LSBs of this result and sign-extends it by one bit from bit W+1.
//
// This differs from the document in one point. There the adder is W+1 bits
// wide and its MSB is copied into the two sign-extension bits of the next
// stage. A running sum can reach +2^(W+2i) (multiplicand -2^(W-1) times a
// multiplier prefix of -2^(2i+1)), which needs W+2 bits; copying the MSB then
// gives a wrong product. The extra sign bit costs two XOR gates per stage.
//
// Purely combinational.
module pp_adder #(
  parameter int unsigned W = booth_pkg::DEFAULT_W
) (
  input  logic [W:0]   a,
  input  logic [W:0]   b,
  input  logic         cin,
  output logic [W+1:0] sum
);

  logic [W:0] s;
  logic       cout;

  cla_adder #(.WIDTH(W + 1)) u_cla (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .sum  (s),
    .cout (cout)
  );

  assign sum = {a[W] ^ b[W] ^ cout, s};

endmodule

// xa0_adder: adds the first row's XA0 into the first partial product.
//
// Every negative Booth digit needs a +1 at the row's least significant bit.
// For rows 1 and up it is the carry-in of the adder that takes the row; the
// first row has no adder of its own, so XA0 is added here. Only a carry can
// be added, so the block is an incrementer: a chain of half adders over the
// W+1 bit row sign-extended to W+2 bits (so that -2M of the most negative
// multiplicand, +2^W, does not overflow). Bits [1:0] of the result are final
// product bits; bits [W+1:2] go to the first pp_adder.
//
// The document adds XA0 with a small low-order adder merged into the first
// full-width adder stage; the separate half-adder chain is this design's way
// of providing that function.
//
// Purely combinational.
module xa0_adder #(
  parameter int unsigned W = booth_pkg::DEFAULT_W
) (
  input  logic [W:0]   pp0,
  input  logic         xa0,
  output logic [W+1:0] row0
);

  logic [W+1:0] e;
  logic [W+2:0] c;

  always_comb begin
    e    = {pp0[W], pp0};
    c    = '0;
    c[0] = xa0;
    for (int i = 0; i <= W + 1; i++) begin
      row0[i] = e[i] ^ c[i];
      c[i+1]  = e[i] & c[i];
    end
  end

endmodule

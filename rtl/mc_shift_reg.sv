// mc_shift_reg: the multiplicand shift-left register of a partial product
// generator.
//
// Holds the multiplicand as a W+1 bit two's complement number: on load it
// takes mc sign-extended by one bit, and on shift it moves one place left,
// filling a zero, which doubles it (the 2M of the Booth table). W+1 bits hold
// 2M for every W-bit multiplicand.
//
// Interface: load has priority over shift; both act on the rising edge of
// clk. q is the register content. Reset clears it.
// The document names the register, its W-bit input and its W+1 bit output;
// the load/shift controls and the reset are this design's choice.
module mc_shift_reg #(
  parameter int unsigned W = booth_pkg::DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] mc,
  output logic [W:0]   q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= {mc[W-1], mc};
    else if (shift) q <= {q[W-1:0], 1'b0};
  end

endmodule

// shift_reg_sel: shift register selector of one partial product generator.
//
// Decides whether the multiplicand must be doubled for this Booth digit.
// That is the case for the codes 011 (add 2M) and 100 (subtract 2M) of the
// Booth table. The decision is formed, as in the selector's gate diagram,
// by two three-input NANDs (XA.~XB.~XC and ~XA.XB.XC) merged by a
// two-input NAND, and it is held in a D flip-flop clocked by clk.
//
// Interface: sel is the {XA,XB,XC} window taken from the multiplier
// register; shift_q is the registered decision, valid one clock after sel.
// Timing: one flip-flop, sampled on every rising edge of clk.
// The gate structure and the output flip-flop follow the document. The
// document's flip-flop is an explicit-pulsed dual-edge cell; here it is an
// ordinary rising-edge flip-flop with an asynchronous active-low reset, which
// is this design's choice.
module shift_reg_sel
  import booth_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  booth_sel_t sel,
  output logic       shift_q
);

  logic nand_sub2m;  // low for code 100
  logic nand_add2m;  // low for code 011
  logic shift_d;

  always_comb begin
    nand_sub2m = ~(sel.xa & ~sel.xb & ~sel.xc);
    nand_add2m = ~(~sel.xa & sel.xb & sel.xc);
    shift_d    = ~(nand_sub2m & nand_add2m);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) shift_q <= 1'b0;
    else        shift_q <= shift_d;
  end

endmodule

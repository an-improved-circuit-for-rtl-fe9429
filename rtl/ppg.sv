// ppg: radix-4 Booth partial product generator.
//
// Produces one W+1 bit partial product row from the W-bit multiplicand and
// one Booth select window {XA,XB,XC}. The path is the one of the generator's
// block diagram:
//   shift-left register  holds M sign-extended, doubled once if the shift
//                        register selector asks for it (digit +/-2);
//   XOR array            inverts every bit when XA = 1 (negative digit);
//   first NAND array     each bit NANDed with the add-zero selector output;
//   second NAND array    each bit NANDed with the subtract-zero selector.
// The result is M, 2M, ~M, ~2M, 0 (code 000) or all ones (code 111). The +1
// that completes the negation is not added here: XA is the carry-in of the
// adder that takes this row.
//
// Interface and timing:
//   load      loads mc into the shift-left register (rising edge).
//   shift_en  lets the shift register act on the registered shift decision;
//             raise it for one cycle after the selector has sampled sel.
//   sel       must be stable from the cycle after load until the row is
//             consumed. The shift decision is registered (one cycle).
//   pp        combinational from the register and sel.
// Structure and gates follow the document; the load/shift_en controls are
// this design's choice.
module ppg
  import booth_pkg::*;
#(
  parameter int unsigned W = DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift_en,
  input  logic [W-1:0] mc,
  input  booth_sel_t   sel,
  output logic [W:0]   pp
);

  logic         shift_q;
  logic         add_zero_n;
  logic         sub_zero_n;
  logic [W:0]   mreg;
  logic [W:0]   xored;
  logic [W:0]   nand1;

  shift_reg_sel u_shift_sel (
    .clk     (clk),
    .rst_n   (rst_n),
    .sel     (sel),
    .shift_q (shift_q)
  );

  add_zero_sel u_add_zero (
    .sel        (sel),
    .add_zero_n (add_zero_n)
  );

  sub_zero_sel u_sub_zero (
    .sel        (sel),
    .sub_zero_n (sub_zero_n)
  );

  mc_shift_reg #(.W(W)) u_mreg (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load),
    .shift (shift_en & shift_q),
    .mc    (mc),
    .q     (mreg)
  );

  always_comb begin
    xored = mreg ^ {(W+1){sel.xa}};
    nand1 = ~(xored & {(W+1){add_zero_n}});
    pp    = ~(nand1 & {(W+1){sub_zero_n}});
  end

endmodule

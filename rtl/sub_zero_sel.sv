// sub_zero_sel: partial product subtract-zero selector.
//
// Detects the Booth code 111 ("subtract zero"). It is a three-input NAND of
// the select lines, so sub_zero_n is 0 for code 111 and 1 otherwise. In the
// partial product generator it gates the second NAND array, which then
// outputs all ones: the one's complement of zero. Together with the carry-in
// XA = 1 of the following adder this row contributes exactly zero.
//
// Interface: sel = {XA,XB,XC}; sub_zero_n is active low. Purely
// combinational. The gate structure follows the document.
module sub_zero_sel
  import booth_pkg::*;
(
  input  booth_sel_t sel,
  output logic       sub_zero_n
);

  assign sub_zero_n = ~(sel.xa & sel.xb & sel.xc);

endmodule

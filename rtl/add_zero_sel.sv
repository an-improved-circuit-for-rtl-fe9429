// add_zero_sel: partial product add-zero selector.
//
// Detects the Booth code 000 ("add zero"). It is a three-input NAND of the
// inverted select lines, so its output add_zero_n is 0 for code 000 and 1
// for every other code. In the partial product generator this output gates
// the first NAND array: when it is 0 that array outputs all ones, and the
// second NAND array turns them into a zero partial product.
//
// Interface: sel = {XA,XB,XC}; add_zero_n is active low. Purely
// combinational. The gate structure follows the document.
module add_zero_sel
  import booth_pkg::*;
(
  input  booth_sel_t sel,
  output logic       add_zero_n
);

  assign add_zero_n = ~(~sel.xa & ~sel.xb & ~sel.xc);

endmodule

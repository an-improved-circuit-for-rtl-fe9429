// booth_pkg: types and constants shared by the radix-4 modified Booth multiplier.
//
// booth_sel_t is one radix-4 recoding window of the multiplier, the three
// select lines XA, XB and XC. XA is the most significant of the three bits
// (b[2i+1]), XB the middle one (b[2i]) and XC the least significant
// (b[2i-1], with b[-1] = 0). Read as the three-bit code {XA,XB,XC} it selects
// the operation of the Booth table: 000 add zero, 001/010 add M, 011 add 2M,
// 100 subtract 2M, 101/110 subtract M, 111 subtract zero. XA is therefore the
// sign of the digit: it inverts the multiplicand and is added as the
// carry-in that completes the two's complement.
//
// seq_state_t names the steps of one multiplication (see booth_seq). The
// step sequence is this design's own choice; the operand width default of 32
// is the main configuration of the multiplier.
package booth_pkg;

  localparam int unsigned DEFAULT_W = 32;

  typedef struct packed {
    logic xa;  // b[2i+1], sign of the digit
    logic xb;  // b[2i]
    logic xc;  // b[2i-1]
  } booth_sel_t;

  typedef enum logic [1:0] {
    S_IDLE,     // waiting for start
    S_DECODE,   // shift-selector flip-flops sample the multiplier register
    S_SHIFT,    // multiplicand registers shift left where a digit is +/-2
    S_CAPTURE   // adder chain has settled, product register loads
  } seq_state_t;

  // Reference value of one Booth digit, -2..+2, for a select triple.
  function automatic int booth_digit(booth_sel_t s);
    return -2 * int'(s.xa) + int'(s.xb) + int'(s.xc);
  endfunction

endpackage

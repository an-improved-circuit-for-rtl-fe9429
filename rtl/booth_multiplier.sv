// booth_multiplier: signed W x W radix-4 modified Booth multiplier.
//
// The multiplier is recoded in overlapping three-bit windows {XA,XB,XC} =
// {b[2i+1], b[2i], b[2i-1]} (b[-1] = 0), one per pair of bits, giving W/2
// digits in -2..+2. Each window drives a partial product generator (ppg)
// that outputs a W+1 bit row: M, 2M, their bitwise inverses, zero or all
// ones. Instead of an adder tree, the rows are summed by a chain of W/2-1
// carry-lookahead adders (pp_adder) that each add one row to the running
// sum:
//   - the first row gets its +1 (XA0) from xa0_adder;
//   - at every stage the two LSBs of the running sum are already final and
//     go straight to the product; the rest, sign-extended, is the adder's
//     other operand, aligned with the next row (which is worth 4x more);
//   - the carry-in of stage i is XA of row i, completing that row's
//     two's complement negation.
// The last stage supplies the top W+2 product bits. The product is held in a
// 2W-bit product register.
//
// Interface: start (one cycle, while busy=0) takes mc and mp. done pulses
// for one cycle four clock edges later, when product holds mc*mp as a signed
// 2W-bit number; product then stays until the next operation completes.
// See booth_seq for the cycle sequence.
//
// Follows the document: the recoding windows, the generator structure, the
// one-row-per-adder chain with the LSBs passed through and XA as carry-in,
// the 3-bit carry-lookahead groups. This design's choices: the cycle
// sequence, the extra sign bit of each adder stage (see pp_adder), and the
// incrementer that adds XA0 (see xa0_adder). The document also uses
// pulse-triggered dual-edge flip-flops; here all registers are rising-edge.
module booth_multiplier
  import booth_pkg::*;
#(
  parameter int unsigned W = DEFAULT_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   mc,
  input  logic [W-1:0]   mp,
  output logic           busy,
  output logic           done,
  output logic [2*W-1:0] product
);

  localparam int unsigned NROW = W / 2;

  initial begin
    assert (W >= 4 && W % 2 == 0)
      else $fatal(1, "booth_multiplier: W must be even and at least 4");
  end

  logic load, shift_en, capture;

  logic [W-1:0]   mp_q;
  logic [W:0]     mpx;                 // multiplier with the appended b[-1] = 0
  booth_sel_t     sel  [NROW];
  logic [W:0]     pp   [NROW];
  logic [W+1:0]   acc  [NROW];         // running sum after row i, bits 2i..2i+W+1
  logic [2*W-1:0] prod_d;

  booth_seq u_seq (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .load     (load),
    .shift_en (shift_en),
    .capture  (capture),
    .busy     (busy),
    .done     (done)
  );

  load_reg #(.WIDTH(W)) u_mp_reg (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load),
    .d     (mp),
    .q     (mp_q)
  );

  assign mpx = {mp_q, 1'b0};

  for (genvar i = 0; i < NROW; i++) begin : g_row
    assign sel[i] = '{xa: mpx[2*i+2], xb: mpx[2*i+1], xc: mpx[2*i]};

    ppg #(.W(W)) u_ppg (
      .clk      (clk),
      .rst_n    (rst_n),
      .load     (load),
      .shift_en (shift_en),
      .mc       (mc),
      .sel      (sel[i]),
      .pp       (pp[i])
    );

    if (i == 0) begin : g_first
      xa0_adder #(.W(W)) u_xa0 (
        .pp0  (pp[0]),
        .xa0  (sel[0].xa),
        .row0 (acc[0])
      );
    end else begin : g_add
      pp_adder #(.W(W)) u_add (
        .a   ({acc[i-1][W+1], acc[i-1][W+1:2]}),
        .b   (pp[i]),
        .cin (sel[i].xa),
        .sum (acc[i])
      );
    end

    if (i < NROW - 1) begin : g_lsb
      assign prod_d[2*i +: 2] = acc[i][1:0];
    end else begin : g_top
      assign prod_d[2*W-1:2*i] = acc[i];
    end
  end

  load_reg #(.WIDTH(2 * W)) u_prod_reg (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (capture),
    .d     (prod_d),
    .q     (product)
  );

endmodule

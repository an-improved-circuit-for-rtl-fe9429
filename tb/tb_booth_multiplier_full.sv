// tb_booth_multiplier_full: the multiplier at its default width (32 x 32),
// parameters untouched. Runs the extreme operands, the multiplicand -2^31
// against every multiplier whose Booth prefix is most negative, the worked
// example 78 x (-38), and 1000000 random operand pairs, each checked against
// the signed product, with the four-cycle latency and the mechanism counts
// of booth_mul_exerciser.
module tb_booth_multiplier_full;
  localparam int W = booth_pkg::DEFAULT_W;

  logic           clk, rst_n, start, busy, done;
  logic [W-1:0]   mc, mp;
  logic [2*W-1:0] product;
  int             checks, failures;
  logic           finished;

  booth_multiplier dut (
    .clk(clk), .rst_n(rst_n), .start(start), .mc(mc), .mp(mp),
    .busy(busy), .done(done), .product(product));

  booth_mul_exerciser #(.W(W), .EXHAUSTIVE(1'b0), .NRAND(1000000)) u_ex (
    .clk(clk), .rst_n(rst_n), .start(start), .mc(mc), .mp(mp),
    .busy(busy), .done(done), .product(product),
    .checks(checks), .failures(failures), .finished(finished));

  initial begin
    #200_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

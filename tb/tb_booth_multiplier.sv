// tb_booth_multiplier: end-to-end test of the multiplier at reduced widths.
// W = 8: every one of the 65536 operand pairs. W = 16 (the width of the
// multiplier's block diagram): extreme operands and 20000 random pairs.
// Products, the four-cycle latency, busy/done and the mechanism counts are
// checked by booth_mul_exerciser.
// A third W = 8 instance runs the worked example 78 x (-38) alone and checks
// its internals: each partial product row plus its XA must be -2M, -M, +2M,
// -M (-156, -78, 156, -78), and the running sums after each stage must be
// -156, -468, 2028 and -2964 (stage output weighted by 4^i plus the product
// bits already passed through below it).
module tb_booth_multiplier;
  logic         clk8, rst8, start8, busy8, done8;
  logic [7:0]   mc8, mp8;
  logic [15:0]  prod8;
  logic         clk16, rst16, start16, busy16, done16;
  logic [15:0]  mc16, mp16;
  logic [31:0]  prod16;
  int           checks8, failures8, checks16, failures16;
  logic         fin8, fin16;
  logic         clk_ex = 0, rst_ex = 0, start_ex = 0, busy_ex, done_ex;
  logic [7:0]   mc_ex = '0, mp_ex = '0;
  logic [15:0]  prod_ex;
  int           checks_ex = 0, failures_ex = 0;
  logic         fin_ex = 0;

  booth_multiplier #(.W(8)) dut_ex (
    .clk(clk_ex), .rst_n(rst_ex), .start(start_ex), .mc(mc_ex), .mp(mp_ex),
    .busy(busy_ex), .done(done_ex), .product(prod_ex));

  always #5 clk_ex = ~clk_ex;

  task automatic check_ex(string what, longint got, longint want);
    checks_ex++;
    if (got != want) begin
      failures_ex++;
      $display("FAIL example 78 x -38: %s = %0d, expected %0d", what, got, want);
    end
  endtask

  // Value of the running sum after row i, with the product bits already
  // passed through below it.
  function automatic longint sum_after(int i);
    longint v;
    v = longint'($signed(dut_ex.acc[i])) <<< (2 * i);
    for (int j = 0; j < i; j++)
      v += longint'(dut_ex.acc[j][1:0]) <<< (2 * j);
    return v;
  endfunction

  initial begin
    longint row_want [4] = '{-156, -78, 156, -78};
    longint sum_want [4] = '{-156, -468, 2028, -2964};
    #12 rst_ex = 1;
    @(negedge clk_ex);
    mc_ex = 8'd78; mp_ex = 8'hda;  // -38 = 1101_1010
    start_ex = 1;
    @(negedge clk_ex);
    start_ex = 0;
    repeat (2) @(negedge clk_ex);  // after the shift edge
    for (int i = 0; i < 4; i++) begin
      check_ex($sformatf("row %0d + XA", i),
               longint'($signed(dut_ex.pp[i])) + longint'(dut_ex.sel[i].xa), row_want[i]);
      check_ex($sformatf("running sum after row %0d", i), sum_after(i), sum_want[i]);
    end
    @(negedge clk_ex);
    check_ex("done", longint'(done_ex), 1);
    check_ex("product", longint'($signed(prod_ex)), -2964);
    fin_ex = 1;
  end

  booth_multiplier #(.W(8)) dut8 (
    .clk(clk8), .rst_n(rst8), .start(start8), .mc(mc8), .mp(mp8),
    .busy(busy8), .done(done8), .product(prod8));

  booth_mul_exerciser #(.W(8), .EXHAUSTIVE(1'b1)) u_w8 (
    .clk(clk8), .rst_n(rst8), .start(start8), .mc(mc8), .mp(mp8),
    .busy(busy8), .done(done8), .product(prod8),
    .checks(checks8), .failures(failures8), .finished(fin8));

  booth_multiplier #(.W(16)) dut16 (
    .clk(clk16), .rst_n(rst16), .start(start16), .mc(mc16), .mp(mp16),
    .busy(busy16), .done(done16), .product(prod16));

  booth_mul_exerciser #(.W(16), .EXHAUSTIVE(1'b0), .NRAND(20000)) u_w16 (
    .clk(clk16), .rst_n(rst16), .start(start16), .mc(mc16), .mp(mp16),
    .busy(busy16), .done(done16), .product(prod16),
    .checks(checks16), .failures(failures16), .finished(fin16));

  initial begin
    #20_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks8 + checks16 + checks_ex,
             failures8 + failures16 + failures_ex + 1);
    $finish;
  end

  initial begin
    #1;
    wait (fin8 && fin16 && fin_ex);
    $display("TB_RESULT checks=%0d failures=%0d", checks8 + checks16 + checks_ex,
             failures8 + failures16 + failures_ex);
    $finish;
  end
endmodule

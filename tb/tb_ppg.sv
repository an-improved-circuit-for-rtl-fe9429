// tb_ppg: checks the partial product generator for every Booth code.
// For each of the eight select codes and random multiplicands (plus the
// extreme values) it loads the generator, lets the selector sample, gives the
// one-cycle shift_en and compares pp with k*M (k = 0, 1 or 2, sign-extended
// to W+1 bits), inverted bit by bit when XA = 1. Before shift_en the row of a
// +/-2 digit must still be +/-1 times M, which checks that the doubling is
// done by the register and only once shift_en allows it. It also checks that
// pp + XA equals digit*M modulo 2^(W+1).
module tb_ppg;
  import booth_pkg::*;
  localparam int W = 32;

  logic         clk = 0, rst_n = 0, load = 0, shift_en = 0;
  logic [W-1:0] mc;
  booth_sel_t   sel;
  logic [W:0]   pp;
  int           checks = 0, failures = 0;

  ppg #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .load(load), .shift_en(shift_en),
                    .mc(mc), .sel(sel), .pp(pp));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W:0] expect_row(logic [W-1:0] m, booth_sel_t s, bit doubled);
    logic signed [W:0] mag;
    int                d;
    d   = booth_digit(s);
    mag = (d == 0) ? '0 : (doubled && (d == 2 || d == -2)) ? {m, 1'b0} : {m[W-1], m};
    return s.xa ? ~mag : mag;
  endfunction

  task automatic check(string what, logic [W:0] e);
    checks++;
    if (pp !== e) begin
      failures++;
      $display("FAIL %s code=%03b mc=%h pp=%h expected %h", what, sel, mc, pp, e);
    end
  endtask

  initial begin
    sel = '0; mc = '0;
    #12 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      logic [W-1:0] m;
      logic [W:0]   sum;
      m = (n < 8) ? 32'h8000_0000 : (n < 16) ? 32'h7fff_ffff : (n < 24) ? 32'hffff_ffff : $urandom;
      @(negedge clk);
      mc = m; sel = booth_sel_t'(n % 8); load = 1;
      @(negedge clk);
      load = 0; mc = $urandom;                  // mc may change after load
      check("after load", expect_row(m, sel, 0));
      @(negedge clk);                           // selector flip-flop has sampled
      shift_en = 1;
      check("before shift", expect_row(m, sel, 0));
      @(negedge clk);
      shift_en = 0;
      check("after shift", expect_row(m, sel, 1));
      sum = pp + (W+1)'(sel.xa);
      checks++;
      if ($signed(sum) !== (W+1)'(booth_digit(sel) * $signed({m[W-1], m}))) begin
        failures++;
        $display("FAIL pp+XA code=%03b mc=%h", sel, m);
      end
      @(negedge clk);
      check("hold", expect_row(m, sel, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

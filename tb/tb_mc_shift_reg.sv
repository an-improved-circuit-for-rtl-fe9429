// tb_mc_shift_reg: checks load (sign extension), shift (doubling), hold and
// load-over-shift priority of the multiplicand shift-left register.
module tb_mc_shift_reg;
  localparam int W = 32;

  logic         clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [W-1:0] mc;
  logic [W:0]   q, exp_q;
  int           checks = 0, failures = 0;

  mc_shift_reg dut (.clk(clk), .rst_n(rst_n), .load(load), .shift(shift), .mc(mc), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL %s q=%h expected %h", what, q, exp_q);
    end
  endtask

  initial begin
    mc = '0;
    #12;
    exp_q = '0;
    check("reset");
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [W-1:0] v;
      logic         lo, sh;
      v  = (n == 0) ? 32'h8000_0000 : (n == 1) ? 32'h7fff_ffff : $urandom;
      lo = (n % 3 == 0) ? 1'b1 : 1'($urandom_range(0, 1));
      sh = 1'($urandom_range(0, 1));
      @(negedge clk);
      mc = v; load = lo; shift = sh;
      if (lo)      exp_q = {v[W-1], v};
      else if (sh) exp_q = {exp_q[W-1:0], 1'b0};
      @(posedge clk); #1;
      check(lo ? "load" : sh ? "shift" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

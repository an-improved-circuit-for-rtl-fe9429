// tb_load_reg: checks reset, load and hold of the load-enabled register.
module tb_load_reg;
  localparam int WIDTH = 64;

  logic             clk = 0, rst_n = 0, load = 0;
  logic [WIDTH-1:0] d, q, exp_q;
  int               checks = 0, failures = 0;

  load_reg dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    exp_q = '0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      d    = {$urandom, $urandom};
      load = 1'($urandom_range(0, 1));
      if (load) exp_q = d;
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL load=%b q=%h expected %h", load, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

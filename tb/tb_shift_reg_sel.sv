// tb_shift_reg_sel: checks the registered shift decision.
// After reset shift_q is 0. Then a random code is applied every cycle and
// shift_q must equal, one clock later, 1 for codes 011 and 100 and 0 for the
// others. All eight codes are also applied in order.
module tb_shift_reg_sel;
  import booth_pkg::*;

  logic       clk = 0, rst_n = 0;
  booth_sel_t sel;
  logic       shift_q;
  int         checks = 0, failures = 0;

  shift_reg_sel dut (.clk(clk), .rst_n(rst_n), .sel(sel), .shift_q(shift_q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic want(booth_sel_t s);
    return (s == 3'b011) || (s == 3'b100);
  endfunction

  initial begin
    booth_sel_t prev;
    sel = 3'b100;
    #12;
    checks++;
    if (shift_q !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    prev  = sel;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      sel = (n < 8) ? booth_sel_t'(n[2:0]) : booth_sel_t'($urandom_range(0, 7));
      @(posedge clk); #1;
      checks++;
      if (shift_q !== want(sel)) begin
        failures++;
        $display("FAIL code=%03b shift_q=%b", sel, shift_q);
      end
      // Registered: changing the input without a clock edge must not show.
      prev = sel;
      sel  = ~sel;
      #1;
      checks++;
      if (shift_q !== want(prev)) begin
        failures++;
        $display("FAIL output changed without a clock edge");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

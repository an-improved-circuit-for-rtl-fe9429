// tb_add_zero_sel: exhaustive check of the add-zero selector.
// For all eight select codes, add_zero_n must be 0 exactly for code 000.
module tb_add_zero_sel;
  import booth_pkg::*;

  booth_sel_t sel;
  logic       add_zero_n;
  int         checks = 0, failures = 0;

  add_zero_sel dut (.sel(sel), .add_zero_n(add_zero_n));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int code = 0; code < 8; code++) begin
      sel = booth_sel_t'(code[2:0]);
      #1;
      checks++;
      if (add_zero_n !== (code != 0)) begin
        failures++;
        $display("FAIL code=%03b add_zero_n=%b", code[2:0], add_zero_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

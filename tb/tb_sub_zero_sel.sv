// tb_sub_zero_sel: exhaustive check of the subtract-zero selector.
// For all eight select codes, sub_zero_n must be 0 exactly for code 111.
module tb_sub_zero_sel;
  import booth_pkg::*;

  booth_sel_t sel;
  logic       sub_zero_n;
  int         checks = 0, failures = 0;

  sub_zero_sel dut (.sel(sel), .sub_zero_n(sub_zero_n));

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
      if (sub_zero_n !== (code != 7)) begin
        failures++;
        $display("FAIL code=%03b sub_zero_n=%b", code[2:0], sub_zero_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_xa0_adder: checks that row0 = pp0 (read as a W+1 bit signed number)
// + xa0, as a W+2 bit signed number, for random rows and the rows whose
// increment carries all the way up (all ones, 0111...1).
module tb_xa0_adder;
  localparam int W = 32;

  logic [W:0]   pp0;
  logic         xa0;
  logic [W+1:0] row0;
  int           checks = 0, failures = 0;

  xa0_adder #(.W(W)) dut (.pp0(pp0), .xa0(xa0), .row0(row0));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 10000; n++) begin
      logic [W+1:0] e;
      case (n)
        0, 1:    pp0 = '1;
        2, 3:    pp0 = {1'b0, {W{1'b1}}};
        4, 5:    pp0 = {1'b1, {W{1'b0}}};
        6, 7:    pp0 = {{(W-1){1'b0}}, 2'b11};
        default: pp0 = {1'($urandom), $urandom};
      endcase
      xa0 = (n < 8) ? 1'(n) : 1'($urandom);
      #1;
      e = {pp0[W], pp0} + (W+2)'(xa0);
      checks++;
      if (row0 !== e) begin
        failures++;
        $display("FAIL pp0=%h xa0=%b row0=%h expected %h", pp0, xa0, row0, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

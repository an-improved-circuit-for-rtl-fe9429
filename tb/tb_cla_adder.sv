// tb_cla_adder: checks the carry-lookahead adder against integer addition.
// Two widths: 33 bits (the default, one whole number of groups short of the
// padding case: 11 groups) and 7 bits (last group partly padded), the
// latter exhaustively over a, b and cin.
module tb_cla_adder;
  localparam int WA = 33;
  localparam int WB = 7;

  logic [WA-1:0] a1, b1, s1;
  logic          ci1, co1;
  logic [WB-1:0] a2, b2, s2;
  logic          ci2, co2;
  int            checks = 0, failures = 0;

  cla_adder dut_a (.a(a1), .b(b1), .cin(ci1), .sum(s1), .cout(co1));
  cla_adder #(.WIDTH(WB)) dut_b (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [WA:0] e;
      a1  = (n == 0) ? '1 : {1'($urandom), $urandom};
      b1  = (n == 0) ? '0 : (n == 1) ? ~a1 : {1'($urandom), $urandom};
      ci1 = (n < 2) ? 1'b1 : 1'($urandom);
      #1;
      e = {1'b0, a1} + {1'b0, b1} + (WA+1)'(ci1);
      checks++;
      if ({co1, s1} !== e) begin
        failures++;
        $display("FAIL w=%0d %h+%h+%b = %h expected %h", WA, a1, b1, ci1, {co1, s1}, e);
      end
    end
    for (int x = 0; x < (1 << WB); x++)
      for (int y = 0; y < (1 << WB); y++)
        for (int c = 0; c < 2; c++) begin
          a2 = WB'(x); b2 = WB'(y); ci2 = 1'(c);
          #1;
          checks++;
          if ({co2, s2} !== (WB+1)'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("FAIL w=%0d %0d+%0d+%0d", WB, x, y, c);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

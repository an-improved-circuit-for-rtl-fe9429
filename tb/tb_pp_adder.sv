// tb_pp_adder: checks one adder stage: sum must equal a + b + cin with a and
// b read as W+1 bit signed numbers and the result as a W+2 bit signed number
// (no overflow). Random operands plus the extremes, which include the case
// where the result needs the extra sign bit.
module tb_pp_adder;
  localparam int W = 32;

  logic [W:0]   a, b;
  logic         cin;
  logic [W+1:0] sum;
  int           checks = 0, failures = 0;
  int           wide = 0;   // results that do not fit in W+1 bits

  pp_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] corner [6];
    corner = '{{1'b1, {W{1'b0}}}, {1'b0, {W{1'b1}}}, '1, '0, {{W{1'b0}}, 1'b1}, {2'b01, {(W-1){1'b0}}}};
    for (int n = 0; n < 20000; n++) begin
      longint ea;
      logic signed [W+1:0] e;
      if (n < 72) begin
        a = corner[n % 6]; b = corner[(n / 6) % 6]; cin = 1'(n / 36);
      end else begin
        a = {1'($urandom), $urandom}; b = {1'($urandom), $urandom}; cin = 1'($urandom);
      end
      #1;
      ea = longint'($signed(a)) + longint'($signed(b)) + longint'(cin);
      e  = (W+2)'(ea);
      if (ea >= (64'sd1 <<< W) || ea < -(64'sd1 <<< W)) wide++;
      checks++;
      if (sum !== e) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b sum=%h expected %h", a, b, cin, sum, e);
      end
    end
    checks++;
    if (wide == 0) begin failures++; $display("FAIL no result needed the extra sign bit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

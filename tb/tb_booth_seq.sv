// tb_booth_seq: checks the step sequence of the sequencer: load only with
// start in idle, then one cycle each of decode, shift and capture, done one
// cycle after capture, start ignored while busy, and a new start accepted
// in the done cycle.
module tb_booth_seq;
  logic clk = 0, rst_n = 0, start = 0;
  logic load, shift_en, capture, busy, done;
  int   checks = 0, failures = 0;

  booth_seq dut (.clk(clk), .rst_n(rst_n), .start(start), .load(load),
                 .shift_en(shift_en), .capture(capture), .busy(busy), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect5(string what, logic l, logic s, logic c, logic b, logic d);
    checks++;
    if ({load, shift_en, capture, busy, done} !== {l, s, c, b, d}) begin
      failures++;
      $display("FAIL %s: load/shift/capture/busy/done=%b%b%b%b%b expected %b%b%b%b%b",
               what, load, shift_en, capture, busy, done, l, s, c, b, d);
    end
  endtask

  initial begin
    #12 rst_n = 1;
    @(negedge clk);
    expect5("idle", 0, 0, 0, 0, 0);
    for (int n = 0; n < 50; n++) begin
      start = 1; #1;
      expect5("start", 1, 0, 0, 0, n > 0 && (n - 1) % 3 != 0);
      @(negedge clk);
      start = (n % 2 == 0);         // start while busy must be ignored
      #1;
      expect5("decode", 0, 0, 0, 1, 0);
      @(negedge clk); #1;
      expect5("shift", 0, 1, 0, 1, 0);
      @(negedge clk); #1;
      expect5("capture", 0, 0, 1, 1, 0);
      @(negedge clk);
      start = 0; #1;
      expect5("done", 0, 0, 0, 0, 1);
      if (n % 3 == 0) begin
        @(negedge clk); #1;
        expect5("idle after done", 0, 0, 0, 0, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

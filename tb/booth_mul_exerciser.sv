// booth_mul_exerciser: drives one booth_multiplier of width W and checks it.
// The multiplier is instantiated by the testbench and connected to the
// ports below; this module makes the clock and reset.
//
// Runs every operand pair (EXHAUSTIVE = 1) or the extreme operands followed
// by NRAND random pairs, back to back. For each operation it checks the
// product against the signed product computed by the simulator, that done
// rises exactly four clock edges after the edge that accepted start, and
// that busy is high in between. Starts raised while busy are checked to be
// ignored, and starts in the done cycle to be accepted.
// It also counts how often each mechanism of the multiplier was exercised
// (every Booth code, a doubled multiplicand, the XA0 carry that leaves the two
// LSBs, a running sum that needs the extra sign bit, a start while busy, a
// start in the done cycle) and counts a failure for any that never happened.
// Results come out on ports; finished rises when it is done.
module booth_mul_exerciser #(
  parameter int unsigned W          = 8,
  parameter bit          EXHAUSTIVE = 1'b1,
  parameter int unsigned NRAND      = 1000
) (
  output logic           clk,
  output logic           rst_n,
  output logic           start,
  output logic [W-1:0]   mc,
  output logic [W-1:0]   mp,
  input  logic           busy,
  input  logic           done,
  input  logic [2*W-1:0] product,
  output int             checks,
  output int             failures,
  output logic           finished
);
  import booth_pkg::*;

  initial begin
    clk = 0; rst_n = 0; start = 0; mc = '0; mp = '0;
  end

  int code_seen [8];
  int n_ops = 0, n_shift = 0, n_xa0_carry = 0, n_wide = 0, n_busy_start = 0, n_done_start = 0;

  always #5 clk = ~clk;

  // Independent bookkeeping of which mechanisms an operand pair exercises.
  task automatic tally(logic [W-1:0] a, logic [W-1:0] b);
    logic [W:0] bx;
    bx = {b, 1'b0};
    for (int i = 0; i < W / 2; i++) begin
      logic [2:0] code;
      longint     pfx, part;
      code = bx[2*i +: 3];
      code_seen[code]++;
      if (code == 3'b011 || code == 3'b100) n_shift++;
      // Running sum after row i: a times the signed value of b[2i+1:0].
      pfx  = longint'(b) & ((64'sd1 <<< (2*i+2)) - 1);
      if (b[2*i+1]) pfx -= (64'sd1 <<< (2*i+2));
      part = longint'($signed(a)) * pfx;
      if ((part >>> (2*i)) >= (64'sd1 <<< W) || (part >>> (2*i)) < -(64'sd1 <<< W)) n_wide++;
    end
    // XA0 carry out of bit 1: digit 0 negative and its row's two LSBs both 1.
    begin
      logic [2:0] c0;
      logic [1:0] lo;
      c0 = bx[2:0];
      lo = (c0 == 3'b100) ? {a[0], 1'b0} : (c0 == 3'b111) ? 2'b00 : a[1:0];
      if (c0[2] && (~lo == 2'b11)) n_xa0_carry++;
    end
  endtask

  task automatic one_op(logic [W-1:0] a, logic [W-1:0] b, bit poke_busy);
    longint         e;
    logic [2*W-1:0] want;
    // Caller is at a negedge with the multiplier idle or in its done cycle.
    if (done) n_done_start++;
    mc = a; mp = b; start = 1;
    @(negedge clk);
    start = poke_busy;          // a start while busy must be ignored
    mc = ~a; mp = ~b;           // operands may change once accepted
    if (poke_busy) n_busy_start++;
    for (int k = 1; k <= 3; k++) begin
      checks++;
      if (!busy || done) begin
        failures++;
        $display("FAIL W=%0d cycle %0d after start: busy=%b done=%b", W, k, busy, done);
      end
      @(negedge clk);
      start = 0;
    end
    e    = longint'($signed(a)) * longint'($signed(b));
    want = (2*W)'(e);
    checks++;
    if (!done || busy) begin
      failures++;
      $display("FAIL W=%0d done not on the fourth edge after start (done=%b busy=%b)", W, done, busy);
    end
    checks++;
    if (product !== want) begin
      failures++;
      if (failures < 20)
        $display("FAIL W=%0d %0d * %0d = %h expected %h", W, $signed(a), $signed(b), product, want);
    end
    tally(a, b);
    n_ops++;
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL W=%0d mechanism never exercised: %s", W, what);
    end
  endtask

  initial begin
    logic [W-1:0] ext [5];
    checks = 0; failures = 0; finished = 0;
    foreach (code_seen[i]) code_seen[i] = 0;
    ext = '{{1'b1, {(W-1){1'b0}}}, {1'b0, {(W-1){1'b1}}}, '0, '1, {{(W-1){1'b0}}, 1'b1}};
    #12 rst_n = 1;
    @(negedge clk);
    // The worked example of the multiplier: 78 x (-38) = -2964.
    one_op(W'(78), W'(-38), 1'b0);
    if (EXHAUSTIVE) begin
      for (int x = 0; x < (1 << W); x++)
        for (int y = 0; y < (1 << W); y++) begin
          one_op(W'(x), W'(y), (y % 7) == 3);
          if ((y % 5) == 0) @(negedge clk);   // sometimes return to idle
        end
    end else begin
      foreach (ext[i]) foreach (ext[j]) one_op(ext[i], ext[j], 1'b0);
      // -2^(W-1) times multipliers whose prefixes are -2^(2i+1)
      for (int i = 0; i < W / 2; i++) one_op(ext[0], W'(1) << (2*i+1), 1'b0);
      for (int n = 0; n < NRAND; n++) begin
        logic [W-1:0] a, b;
        a = W'({$urandom, $urandom});
        b = W'({$urandom, $urandom});
        if (n % 10 == 1) a = ext[$urandom_range(0, 4)];
        if (n % 10 == 2) b = ext[$urandom_range(0, 4)];
        one_op(a, b, (n % 7) == 3);
        if ((n % 5) == 0) @(negedge clk);
      end
    end
    foreach (code_seen[i]) need($sformatf("Booth code %03b", 3'(i)), code_seen[i]);
    need("doubled multiplicand (+/-2M)", n_shift);
    need("XA0 carry beyond the two LSBs", n_xa0_carry);
    need("running sum needing the extra sign bit", n_wide);
    need("start while busy (ignored)", n_busy_start);
    need("start in the done cycle", n_done_start);
    $display("W=%0d: %0d operations; shifts=%0d xa0_carry=%0d wide_sums=%0d busy_starts=%0d done_starts=%0d",
             W, n_ops, n_shift, n_xa0_carry, n_wide, n_busy_start, n_done_start);
    finished = 1;
  end
endmodule

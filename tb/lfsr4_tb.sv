// lfsr4_tb: self-checking test of the 4-bit LFSR.
//
// Checks that reset loads the seed, that the first states from seed 0001
// match a hand-worked sequence, that every step matches the rule
// X1 <= X3 ^ X4 with the other stages shifting, that the register visits all
// 15 non-zero states once per period of exactly 15 clocks, that en low holds
// the state, and that serial is X4. A watchdog ends a hung run.
module lfsr4_tb;
  logic clk = 1'b0;
  logic rst, en;
  logic [3:0] q;
  logic serial;
  int checks = 0, failures = 0;

  lfsr4 #(.SEED(4'b0001)) dut (.clk, .rst, .en, .q, .serial);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Hand-worked states after the seed 0001.
  localparam logic [3:0] FIRST [6] = '{4'b1000, 4'b0100, 4'b0010, 4'b1001, 4'b1100, 4'b0110};

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] prev, expected;
    bit seen [16];
    int period;
    rst = 1'b1; en = 1'b0;
    @(posedge clk); #1;
    check(q == 4'b0001, "reset loads seed");
    rst = 1'b0; en = 1'b1;
    for (int i = 0; i < 6; i++) begin
      @(posedge clk); #1;
      check(q == FIRST[i], $sformatf("step %0d: got %b want %b", i, q, FIRST[i]));
    end
    // Walk one more full period from here, checking each step and coverage.
    foreach (seen[i]) seen[i] = 0;
    period = 0;
    for (int i = 0; i < 15; i++) begin
      prev = q;
      @(posedge clk); #1;
      expected = {prev[1] ^ prev[0], prev[3], prev[2], prev[1]};
      check(q == expected, $sformatf("rule: %b -> %b, want %b", prev, q, expected));
      check(serial == q[0], "serial is X4");
      check(q != 4'b0000, "never all zero");
      seen[q] = 1;
      period++;
    end
    check(q == FIRST[5], "period is 15");
    for (int v = 1; v < 16; v++) check(seen[v], $sformatf("state %0d visited", v));
    // Enable low holds the state.
    prev = q;
    en = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check(q == prev, "en low holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

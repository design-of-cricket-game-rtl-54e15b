// scoreboard_tb: the cricket score-board.
//
// First a short innings is keyed in, delivery by delivery, ending with a no
// ball and a wide: the board must then read 21 runs, 2 wickets, 2 extras and
// 12 balls. Then random combinations of the eight inputs, with enable
// sometimes low, are compared every clock with a model kept here; among them
// enough wickets to reach the cap of 10. Every event kind is counted and must
// occur.
module scoreboard_tb;
  import cricket_pkg::*;
  logic clk = 1'b0;
  logic rst, enable, dot, one, four, six, wide, noball, wick, ball;
  score_t score;
  wickets_t wickets;
  extras_t extras;
  balls_t balls;
  int checks = 0, failures = 0;
  int ms, mw, me, mb;
  int n_extra_ball_ignored = 0, n_wicket_cap = 0, n_disabled = 0;

  scoreboard dut (.clk, .rst, .enable, .dot, .one, .four, .six, .wide, .noball,
                  .wick, .ball, .score, .wickets, .extras, .balls);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic idle();
    {dot, one, four, six, wide, noball, wick, ball} = '0;
  endtask

  // One clock with the given inputs; the model follows.
  task automatic step(input logic [7:0] ev);   // {dot,one,four,six,wide,noball,wick,ball}
    {dot, one, four, six, wide, noball, wick, ball} = ev;
    @(posedge clk); #1;
    if (enable) begin
      ms = (ms + one + 4 * four + 6 * six + wide + noball) % 256;
      me = (me + wide + noball) % 16;
      if (wick) begin
        if (mw < 10) mw++; else n_wicket_cap++;
      end
      if (ball) begin
        if (!wide && !noball) mb = (mb + 1) % 256; else n_extra_ball_ignored++;
      end
    end else begin
      n_disabled++;
    end
    check(score == 8'(ms) && wickets == 4'(mw) && extras == 4'(me) && balls == 8'(mb),
          $sformatf("got %0d-%0d x%0d b%0d want %0d-%0d x%0d b%0d",
                    score, wickets, extras, balls, ms, mw, me, mb));
    idle();
  endtask

  localparam logic [7:0] DOT = 8'h80, ONE = 8'h40, FOUR = 8'h20, SIX = 8'h10,
                         WIDE = 8'h08, NOBALL = 8'h04, WICK = 8'h02, BALL = 8'h01;

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle();
    rst = 1'b1; enable = 1'b1;
    one = 1'b1; wick = 1'b1;          // ignored while in reset
    @(posedge clk); #1;
    rst = 1'b0;
    ms = 0; mw = 0; me = 0; mb = 0;
    check(score == 0 && wickets == 0 && extras == 0 && balls == 0, "reset");
    idle();
    // A keyed-in over and a bit.
    step(BALL | ONE);  step(BALL | WICK); step(BALL | ONE);  step(BALL | WICK);
    step(BALL | ONE);  step(BALL | FOUR); step(BALL | ONE);  step(BALL | SIX);
    step(BALL | ONE);  step(BALL | FOUR); step(BALL | DOT);  step(BALL | DOT);
    step(NOBALL);      step(WIDE);
    check(score == 21 && wickets == 2 && extras == 2 && balls == 12, "keyed innings 21-2, 2 extras, 12 balls");
    // Random deliveries.
    for (int i = 0; i < 3000; i++) begin
      logic [7:0] ev;
      ev = 8'($urandom);
      ev[1] = ($urandom_range(0, 19) == 0);     // wickets rarer
      enable = ($urandom_range(0, 9) != 0);
      step(ev);
    end
    enable = 1'b1;
    repeat (12) step(WICK | BALL);
    check(wickets == 10, "wickets stop at 10");
    check(n_extra_ball_ignored > 0, "ball ignored with wide / no ball");
    check(n_wicket_cap > 0, "wicket cap reached");
    check(n_disabled > 0, "enable low seen");
    rst = 1'b1;
    @(posedge clk); #1;
    check(score == 0 && wickets == 0 && extras == 0 && balls == 0, "reset again");
    $display("extra-ball ignored %0d, wicket cap %0d, disabled %0d",
             n_extra_ball_ignored, n_wicket_cap, n_disabled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

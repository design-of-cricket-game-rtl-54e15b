// innings_scorer_tb: one innings fed with random balls.
//
// Random balls (runs 0..6 or a wicket) are applied, with bowl sometimes low,
// and the score, wickets, balls and boundaries are compared every clock with
// a model kept here. Three innings are played: one with the default limits
// that ends all out, one with wickets rare so that it runs to the 120-ball
// limit, and one stopped after 6 balls by a small MAX_BALLS instance. Each
// innings checks that done rises on the right ball and that later balls change
// nothing.
module innings_scorer_tb;
  import cricket_pkg::*;
  logic clk = 1'b0;
  logic rst, clr, bowl, wicket, boundary;
  logic [2:0] a;
  score_t   score, score_s;
  wickets_t wickets, wickets_s;
  balls_t   balls, bnds, balls_s, bnds_s;
  logic     done, done_s;
  int checks = 0, failures = 0;
  int all_out_seen = 0, overs_seen = 0;

  innings_scorer dut (.clk, .rst, .clr, .bowl, .a, .wicket, .boundary,
                      .score, .wickets, .balls, .boundaries(bnds), .done);
  innings_scorer #(.MAX_BALLS(6)) dut_s (.clk, .rst, .clr, .bowl, .a, .wicket, .boundary,
                      .score(score_s), .wickets(wickets_s), .balls(balls_s),
                      .boundaries(bnds_s), .done(done_s));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Play one innings; wicket_pct sets how often a ball is a wicket.
  task automatic innings(input int wicket_pct);
    int ms = 0, mw = 0, mb = 0, mbd = 0;
    int ss = 0, sw = 0, sb = 0, sbd = 0;
    clr = 1'b1;
    @(posedge clk); #1;
    clr = 1'b0;
    check(score == 0 && wickets == 0 && balls == 0 && !done, "cleared");
    for (int i = 0; i < 400; i++) begin
      bowl     = ($urandom_range(0, 9) != 0);
      wicket   = ($urandom_range(0, 99) < wicket_pct);
      a        = wicket ? 3'd0 : 3'($urandom_range(0, 6));
      boundary = (a == 3'd4 || a == 3'd6);
      @(posedge clk); #1;
      if (bowl && !(mw == 10 || mb == 120)) begin
        mb++;
        if (wicket) mw++; else ms += a;
        if (boundary) mbd++;
      end
      if (bowl && !(sw == 10 || sb == 6)) begin
        sb++;
        if (wicket) sw++; else ss += a;
        if (boundary) sbd++;
      end
      check(score == 8'(ms) && wickets == 4'(mw) && balls == 8'(mb) && bnds == 8'(mbd),
            $sformatf("ball %0d: got %0d/%0d %0d balls, want %0d/%0d %0d balls",
                      i, score, wickets, balls, ms, mw, mb));
      check(done == (mw == 10 || mb == 120), "done");
      check(score_s == 8'(ss) && wickets_s == 4'(sw) && balls_s == 8'(sb) && bnds_s == 8'(sbd),
            "short innings totals");
      check(done_s == (sw == 10 || sb == 6), "short innings done");
    end
    if (mw == 10) all_out_seen++;
    if (mb == 120) overs_seen++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; clr = 1'b0; bowl = 1'b0; a = '0; wicket = 1'b0; boundary = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    innings(19);   // about 3 wickets in 16 balls, as from the LFSR
    innings(3);    // rare wickets: innings runs to 120 balls
    check(all_out_seen > 0, "an innings ended all out");
    check(overs_seen > 0, "an innings ended at 120 balls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// cricket_game_tb: whole matches of the cricket game against a reference.
//
// Two games run from the same buttons: one with the default limits (120
// balls, 10 wickets) and one whose innings stop after 20 balls. The buttons
// start a match at a random clock (so the LFSR is at a different point each
// time), wait until the match is over, and restart. game_ref_model checks
// every output on every clock. At the end both kinds of innings end (all out
// and at the ball limit) and both teams' wins must have occurred.
module cricket_game_tb;
  import cricket_pkg::*;
  logic clk = 1'b0;
  logic rst, restart, play;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // Default-size game.
  logic team1, team2, game_over, wicket;
  score_t t1s, t2s;
  wickets_t t1o, t2o;
  balls_t balls;
  logic [3:0] o;
  logic [2:0] a;
  winner_e winner;
  win_reason_e reason;

  cricket_game dut (.clk, .rst, .restart, .play, .team1, .team2,
    .team1_score(t1s), .team1_out(t1o), .team2_score(t2s), .team2_out(t2o),
    .balls, .o, .a, .wicket, .game_over, .winner, .win_reason(reason));
  game_ref_model ref_full (.clk, .rst, .restart, .play, .team1, .team2,
    .team1_score(t1s), .team1_out(t1o), .team2_score(t2s), .team2_out(t2o),
    .balls, .o, .a, .game_over, .winner, .win_reason(reason));

  // Short game: 20-ball innings, another seed.
  logic s_team1, s_team2, s_over, s_wicket;
  score_t s_t1s, s_t2s;
  wickets_t s_t1o, s_t2o;
  balls_t s_balls;
  logic [3:0] s_o;
  logic [2:0] s_a;
  winner_e s_winner;
  win_reason_e s_reason;

  cricket_game #(.SEED(4'b1011), .MAX_BALLS(20)) dut_s (.clk, .rst, .restart, .play,
    .team1(s_team1), .team2(s_team2),
    .team1_score(s_t1s), .team1_out(s_t1o), .team2_score(s_t2s), .team2_out(s_t2o),
    .balls(s_balls), .o(s_o), .a(s_a), .wicket(s_wicket), .game_over(s_over),
    .winner(s_winner), .win_reason(s_reason));
  game_ref_model #(.SEED(4'b1011), .MAX_BALLS(20)) ref_short (.clk, .rst, .restart, .play,
    .team1(s_team1), .team2(s_team2),
    .team1_score(s_t1s), .team1_out(s_t1o), .team2_score(s_t2s), .team2_out(s_t2o),
    .balls(s_balls), .o(s_o), .a(s_a), .game_over(s_over),
    .winner(s_winner), .win_reason(s_reason));

  task automatic finish();
    checks += ref_full.checks + ref_short.checks;
    failures += ref_full.failures + ref_short.failures;
    $display("full: %0d games, all out %0d, ball limit %0d, team1 %0d, team2 %0d",
             ref_full.games, ref_full.all_out, ref_full.ball_limit, ref_full.win1, ref_full.win2);
    $display("short: %0d games, all out %0d, ball limit %0d, team1 %0d, team2 %0d",
             ref_short.games, ref_short.all_out, ref_short.ball_limit, ref_short.win1, ref_short.win2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    finish();
  end

  initial begin
    rst = 1'b1; restart = 1'b0; play = 1'b0;
    @(negedge clk);
    rst = 1'b0;
    for (int g = 0; g < 20; g++) begin
      repeat ($urandom_range(0, 16)) @(negedge clk);
      play = 1'b1;
      @(negedge clk);
      play = 1'b0;
      for (int i = 0; i < 400 && !(game_over && s_over); i++) @(negedge clk);
      checks++;
      if (!(game_over && s_over)) begin
        failures++;
        $display("FAIL: match %0d did not end", g);
      end
      repeat (2) @(negedge clk);
      restart = 1'b1;
      @(negedge clk);
      restart = 1'b0;
    end
    checks += 4;
    if (ref_full.all_out == 0)                  begin failures++; $display("FAIL: no innings all out"); end
    if (ref_short.ball_limit == 0)              begin failures++; $display("FAIL: no innings hit the ball limit"); end
    if (ref_full.win1 + ref_short.win1 == 0)    begin failures++; $display("FAIL: team 1 never won"); end
    if (ref_full.win2 + ref_short.win2 == 0)    begin failures++; $display("FAIL: team 2 never won"); end
    finish();
  end
endmodule

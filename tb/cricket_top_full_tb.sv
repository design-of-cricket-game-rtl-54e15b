// cricket_top_full_tb: one complete operation of the top at its default size.
//
// The top is instantiated with no parameter changes (120-ball innings, 10
// wickets). The score-board is keyed through a short innings ending in a no
// ball and a wide, which must leave it at 21 runs, 2 wickets, 2 extras and 12
// balls. Then one full match is played and checked clock by clock by
// game_ref_model; the final result and the match length are printed.
module cricket_top_full_tb;
  import cricket_pkg::*;
  logic clk = 1'b0;
  logic rst, restart, play;
  logic sb_enable, dot, one, four, six, wide, noball, wick, ball;
  int checks = 0, failures = 0;

  logic team1, team2, game_over;
  score_t t1s, t2s, sbs;
  wickets_t t1o, t2o, sbw;
  extras_t sbe;
  balls_t gballs, sbb;
  logic [3:0] o;
  logic [2:0] a;
  winner_e winner;
  win_reason_e why;
  logic [2:0][6:0] t1s_seg, t2s_seg, gb_seg, sbs_seg, sbb_seg;
  logic [1:0][6:0] t1o_seg, t2o_seg, sbw_seg, sbe_seg;

  always #5 clk = ~clk;

  cricket_top dut (
    .clk, .rst, .restart, .play, .team1, .team2,
    .team1_score(t1s), .team1_out(t1o), .team2_score(t2s), .team2_out(t2o),
    .game_balls(gballs), .lfsr_o(o), .lfsr_a(a), .game_over, .winner, .win_reason(why),
    .team1_score_seg(t1s_seg), .team1_out_seg(t1o_seg), .team2_score_seg(t2s_seg),
    .team2_out_seg(t2o_seg), .game_balls_seg(gb_seg),
    .sb_enable, .dot, .one, .four, .six, .wide, .noball, .wick, .ball,
    .sb_score(sbs), .sb_wickets(sbw), .sb_extras(sbe), .sb_balls(sbb),
    .sb_score_seg(sbs_seg), .sb_wickets_seg(sbw_seg), .sb_extras_seg(sbe_seg),
    .sb_balls_seg(sbb_seg));

  game_ref_model ref_game (
    .clk, .rst, .restart, .play, .team1, .team2,
    .team1_score(t1s), .team1_out(t1o), .team2_score(t2s), .team2_out(t2o),
    .balls(gballs), .o, .a, .game_over, .winner, .win_reason(why));

  task automatic deliver(input logic [7:0] ev);  // {dot,one,four,six,wide,noball,wick,ball}
    {dot, one, four, six, wide, noball, wick, ball} = ev;
    @(negedge clk);
    {dot, one, four, six, wide, noball, wick, ball} = '0;
  endtask

  task automatic finish();
    checks += ref_game.checks;
    failures += ref_game.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    finish();
  end

  initial begin
    int clocks;
    rst = 1'b1; restart = 1'b0; play = 1'b0; sb_enable = 1'b1;
    {dot, one, four, six, wide, noball, wick, ball} = '0;
    @(negedge clk);
    rst = 1'b0;
    deliver(8'h41); deliver(8'h03); deliver(8'h41); deliver(8'h03);
    deliver(8'h41); deliver(8'h21); deliver(8'h41); deliver(8'h11);
    deliver(8'h41); deliver(8'h21); deliver(8'h81); deliver(8'h81);
    deliver(8'h04); deliver(8'h08);
    checks++;
    if (!(sbs == 21 && sbw == 2 && sbe == 2 && sbb == 12)) begin
      failures++;
      $display("FAIL: board %0d-%0d x%0d b%0d", sbs, sbw, sbe, sbb);
    end
    $display("board: %0d-%0d, extras %0d, balls %0d", sbs, sbw, sbe, sbb);

    play = 1'b1;
    @(negedge clk);
    play = 1'b0;
    clocks = 0;
    while (!game_over && clocks < 300) begin
      @(negedge clk);
      clocks++;
    end
    checks++;
    if (!game_over) begin
      failures++;
      $display("FAIL: match did not end");
    end
    $display("team 1 %0d-%0d, team 2 %0d-%0d, winner %s by %s, %0d clocks",
             t1s, t1o, t2s, t2o, winner.name(), why.name(), clocks);
    finish();
  end
endmodule

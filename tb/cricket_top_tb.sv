// cricket_top_tb: end-to-end test of the game and the score-board.
//
// Three copies of the top share clock, reset and buttons: one with the default
// limits (120-ball innings), and two with 4- and 5-ball innings, short enough
// that equal scores happen and the wicket and boundary tie-breaks decide a
// match. First the score-board is keyed through a short innings (it must read
// 21-2, 2 extras, 12 balls) and then random deliveries, checked against a
// model here. Then for each of the 15 LFSR starting points a match is played
// on all three copies, each checked clock by clock by game_ref_model. The
// seven-segment outputs are decoded back to numbers and compared with the
// binary totals on every clock. Each mechanism must happen at least once:
// all out, ball limit, wins for both teams, the wicket and boundary
// tie-breaks, a wide, a no ball, a ball ignored beside an extra, the wicket
// cap and enable low.
module cricket_top_tb;
  import cricket_pkg::*;
  logic clk = 1'b0;
  logic rst, restart, play;
  logic sb_enable, dot, one, four, six, wide, noball, wick, ball;
  int checks = 0, failures = 0;
  int n_wide = 0, n_noball = 0, n_ignored = 0, n_cap = 0, n_disabled = 0;
  int ms = 0, mw = 0, me = 0, mb = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Seven-segment pattern back to its digit; 15 for anything else.
  function automatic int unseg(logic [6:0] s);
    case (s)
      7'h3F: return 0;  7'h06: return 1;  7'h5B: return 2;  7'h4F: return 3;
      7'h66: return 4;  7'h6D: return 5;  7'h7D: return 6;  7'h07: return 7;
      7'h7F: return 8;  7'h6F: return 9;  default: return 15;
    endcase
  endfunction
  function automatic int shown3(logic [2:0][6:0] s);
    return 100 * unseg(s[2]) + 10 * unseg(s[1]) + unseg(s[0]);
  endfunction
  function automatic int shown2(logic [1:0][6:0] s);
    return 10 * unseg(s[1]) + unseg(s[0]);
  endfunction

  // One copy of the top with its reference model.
  `define TOP_COPY(NAME, MAXB)                                                   \
    logic NAME``_t1, NAME``_t2, NAME``_over;                                     \
    score_t NAME``_t1s, NAME``_t2s, NAME``_sbs;                                  \
    wickets_t NAME``_t1o, NAME``_t2o, NAME``_sbw;                                \
    extras_t NAME``_sbe;                                                         \
    balls_t NAME``_balls, NAME``_sbb;                                            \
    logic [3:0] NAME``_o;                                                        \
    logic [2:0] NAME``_a;                                                        \
    winner_e NAME``_win;                                                         \
    win_reason_e NAME``_why;                                                     \
    logic [2:0][6:0] NAME``_t1s_seg, NAME``_t2s_seg, NAME``_gb_seg,              \
                     NAME``_sbs_seg, NAME``_sbb_seg;                             \
    logic [1:0][6:0] NAME``_t1o_seg, NAME``_t2o_seg, NAME``_sbw_seg,             \
                     NAME``_sbe_seg;                                             \
    cricket_top #(.MAX_BALLS(MAXB)) NAME (                                       \
      .clk, .rst, .restart, .play,                                               \
      .team1(NAME``_t1), .team2(NAME``_t2),                                      \
      .team1_score(NAME``_t1s), .team1_out(NAME``_t1o),                          \
      .team2_score(NAME``_t2s), .team2_out(NAME``_t2o),                          \
      .game_balls(NAME``_balls), .lfsr_o(NAME``_o), .lfsr_a(NAME``_a),           \
      .game_over(NAME``_over), .winner(NAME``_win), .win_reason(NAME``_why),     \
      .team1_score_seg(NAME``_t1s_seg), .team1_out_seg(NAME``_t1o_seg),          \
      .team2_score_seg(NAME``_t2s_seg), .team2_out_seg(NAME``_t2o_seg),          \
      .game_balls_seg(NAME``_gb_seg),                                            \
      .sb_enable, .dot, .one, .four, .six, .wide, .noball, .wick, .ball,         \
      .sb_score(NAME``_sbs), .sb_wickets(NAME``_sbw),                            \
      .sb_extras(NAME``_sbe), .sb_balls(NAME``_sbb),                             \
      .sb_score_seg(NAME``_sbs_seg), .sb_wickets_seg(NAME``_sbw_seg),            \
      .sb_extras_seg(NAME``_sbe_seg), .sb_balls_seg(NAME``_sbb_seg));            \
    game_ref_model #(.MAX_BALLS(MAXB)) NAME``_ref (                              \
      .clk, .rst, .restart, .play,                                               \
      .team1(NAME``_t1), .team2(NAME``_t2),                                      \
      .team1_score(NAME``_t1s), .team1_out(NAME``_t1o),                          \
      .team2_score(NAME``_t2s), .team2_out(NAME``_t2o),                          \
      .balls(NAME``_balls), .o(NAME``_o), .a(NAME``_a),                          \
      .game_over(NAME``_over), .winner(NAME``_win), .win_reason(NAME``_why));    \
    always @(negedge clk) begin                                                  \
      check(shown3(NAME``_t1s_seg) == int'(NAME``_t1s) &&                        \
            shown2(NAME``_t1o_seg) == int'(NAME``_t1o) &&                        \
            shown3(NAME``_t2s_seg) == int'(NAME``_t2s) &&                        \
            shown2(NAME``_t2o_seg) == int'(NAME``_t2o) &&                        \
            shown3(NAME``_gb_seg)  == int'(NAME``_balls), "game displays");      \
      check(shown3(NAME``_sbs_seg) == int'(NAME``_sbs) &&                        \
            shown2(NAME``_sbw_seg) == int'(NAME``_sbw) &&                        \
            shown2(NAME``_sbe_seg) == int'(NAME``_sbe) &&                        \
            shown3(NAME``_sbb_seg) == int'(NAME``_sbb), "board displays");       \
      check(NAME``_sbs == score_t'(ms) && NAME``_sbw == wickets_t'(mw) &&        \
            NAME``_sbe == extras_t'(me) && NAME``_sbb == balls_t'(mb),           \
            $sformatf("board %0d-%0d x%0d b%0d, model %0d-%0d x%0d b%0d",        \
                      NAME``_sbs, NAME``_sbw, NAME``_sbe, NAME``_sbb,            \
                      ms, mw, me, mb));                                          \
    end

  `TOP_COPY(top_full, 120)
  `TOP_COPY(top_b4, 4)
  `TOP_COPY(top_b5, 5)

  // Score-board model, stepped on each rising edge from the buttons.
  always @(posedge clk) begin
    if (rst) begin
      ms = 0; mw = 0; me = 0; mb = 0;
    end else if (sb_enable) begin
      ms = (ms + one + 4 * four + 6 * six + wide + noball) % 256;
      me = (me + wide + noball) % 16;
      if (wide) n_wide++;
      if (noball) n_noball++;
      if (wick) begin
        if (mw < 10) mw++; else n_cap++;
      end
      if (ball) begin
        if (!wide && !noball) mb = (mb + 1) % 256; else n_ignored++;
      end
    end else begin
      n_disabled++;
    end
  end

  task automatic deliver(input logic [7:0] ev);  // {dot,one,four,six,wide,noball,wick,ball}
    {dot, one, four, six, wide, noball, wick, ball} = ev;
    @(negedge clk);
    {dot, one, four, six, wide, noball, wick, ball} = '0;
  endtask

  task automatic finish();
    int all_out, limit, w1, w2, bw, bb;
    checks += top_full_ref.checks + top_b4_ref.checks + top_b5_ref.checks;
    failures += top_full_ref.failures + top_b4_ref.failures + top_b5_ref.failures;
    all_out = top_full_ref.all_out + top_b4_ref.all_out + top_b5_ref.all_out;
    limit   = top_full_ref.ball_limit + top_b4_ref.ball_limit + top_b5_ref.ball_limit;
    w1      = top_full_ref.win1 + top_b4_ref.win1 + top_b5_ref.win1;
    w2      = top_full_ref.win2 + top_b4_ref.win2 + top_b5_ref.win2;
    bw      = top_full_ref.by_wickets + top_b4_ref.by_wickets + top_b5_ref.by_wickets;
    bb      = top_full_ref.by_boundaries + top_b4_ref.by_boundaries + top_b5_ref.by_boundaries;
    $display("innings all out %0d, at ball limit %0d; wins team1 %0d team2 %0d; decided on wickets %0d, on boundaries %0d",
             all_out, limit, w1, w2, bw, bb);
    $display("board: wides %0d, no balls %0d, ball ignored beside extra %0d, wicket cap %0d, disabled clocks %0d",
             n_wide, n_noball, n_ignored, n_cap, n_disabled);
    checks += 11;
    if (all_out == 0)    begin failures++; $display("FAIL: no innings all out"); end
    if (limit == 0)      begin failures++; $display("FAIL: no innings at ball limit"); end
    if (w1 == 0)         begin failures++; $display("FAIL: team 1 never won"); end
    if (w2 == 0)         begin failures++; $display("FAIL: team 2 never won"); end
    if (bw == 0)         begin failures++; $display("FAIL: wicket tie-break never used"); end
    if (bb == 0)         begin failures++; $display("FAIL: boundary tie-break never used"); end
    if (n_wide == 0)     begin failures++; $display("FAIL: no wide"); end
    if (n_noball == 0)   begin failures++; $display("FAIL: no no-ball"); end
    if (n_ignored == 0)  begin failures++; $display("FAIL: no ball beside an extra"); end
    if (n_cap == 0)      begin failures++; $display("FAIL: wicket cap never reached"); end
    if (n_disabled == 0) begin failures++; $display("FAIL: enable never low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    finish();
  end

  initial begin
    rst = 1'b1; restart = 1'b0; play = 1'b0; sb_enable = 1'b1;
    {dot, one, four, six, wide, noball, wick, ball} = '0;
    @(negedge clk);
    rst = 1'b0;

    // Score-board: a keyed innings, then random deliveries.
    deliver(8'h41); deliver(8'h03); deliver(8'h41); deliver(8'h03);
    deliver(8'h41); deliver(8'h21); deliver(8'h41); deliver(8'h11);
    deliver(8'h41); deliver(8'h21); deliver(8'h81); deliver(8'h81);
    deliver(8'h04); deliver(8'h08);
    check(top_full_sbs == 21 && top_full_sbw == 2 && top_full_sbe == 2 && top_full_sbb == 12,
          "keyed innings reads 21-2, 2 extras, 12 balls");
    for (int i = 0; i < 600; i++) begin
      logic [7:0] ev;
      ev = 8'($urandom);
      ev[1] = ($urandom_range(0, 9) == 0);
      sb_enable = ($urandom_range(0, 9) != 0);
      deliver(ev);
    end
    sb_enable = 1'b1;

    // Game: one match from each LFSR starting point.
    for (int d = 0; d < 15; d++) begin
      rst = 1'b1;
      @(negedge clk);
      rst = 1'b0;
      repeat (d) @(negedge clk);
      play = 1'b1;
      @(negedge clk);
      play = 1'b0;
      for (int i = 0; i < 400 && !top_full_over; i++) @(negedge clk);
      check(top_full_over && top_b4_over && top_b5_over, $sformatf("match %0d ended", d));
      restart = 1'b1;
      @(negedge clk);
      restart = 1'b0;
      check(!top_full_over && top_full_t1s == 0 && top_full_t2s == 0, "restart clears");
    end
    finish();
  end
endmodule

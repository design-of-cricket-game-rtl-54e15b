// winner_compare: decides the match from the two teams' totals.
//
// The team with more runs wins. On equal runs the team that lost fewer wickets
// wins; on equal runs and wickets the team with more boundaries (fours and
// sixes) wins; otherwise the match is a tie. The order of the three rules
// follows the document; that fewer wickets (not more) wins the second rule is
// this design's reading of it. The result is shown only while valid is high,
// otherwise WIN_NONE / BY_NOTHING.
//
// Interface: valid; s1/s2 scores, w1/w2 wickets, b1/b2 boundaries in; winner
// and reason out.
// Timing: purely combinational.
module winner_compare
  import cricket_pkg::*;
(
  input  logic        valid,
  input  score_t      s1,
  input  score_t      s2,
  input  wickets_t    w1,
  input  wickets_t    w2,
  input  balls_t      b1,
  input  balls_t      b2,
  output winner_e     winner,
  output win_reason_e reason
);

  always_comb begin
    winner = WIN_NONE;
    reason = BY_NOTHING;
    if (valid) begin
      if (s1 != s2) begin
        winner = (s1 > s2) ? WIN_TEAM1 : WIN_TEAM2;
        reason = BY_RUNS;
      end else if (w1 != w2) begin
        winner = (w1 < w2) ? WIN_TEAM1 : WIN_TEAM2;
        reason = BY_WICKETS;
      end else if (b1 != b2) begin
        winner = (b1 > b2) ? WIN_TEAM1 : WIN_TEAM2;
        reason = BY_BOUNDARIES;
      end else begin
        winner = WIN_TIE;
        reason = BY_NOTHING;
      end
    end
  end

endmodule

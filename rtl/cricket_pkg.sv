// cricket_pkg: types and constants shared by the cricket game and the score
// board.
//
// The match rules that the game follows (120 balls per innings, an innings
// closes at 10 wickets) and the widths of the displayed totals (8-bit score and
// ball count, 4-bit wickets and extras) live here, together with the encodings
// of the match result. The result encodings are this design's own choice.
package cricket_pkg;

  // Innings limits: one ball per clock, at most 120 balls, all out at 10.
  localparam int unsigned MAX_BALLS_DEFAULT   = 120;
  localparam int unsigned MAX_WICKETS_DEFAULT = 10;

  // Widths of the totals.
  localparam int unsigned SCORE_W  = 8;
  localparam int unsigned WICKET_W = 4;
  localparam int unsigned EXTRAS_W = 4;
  localparam int unsigned BALLS_W  = 8;

  typedef logic [SCORE_W-1:0]  score_t;
  typedef logic [WICKET_W-1:0] wickets_t;
  typedef logic [EXTRAS_W-1:0] extras_t;
  typedef logic [BALLS_W-1:0]  balls_t;

  // Outcome of one ball in the game, produced from the LFSR number.
  typedef struct packed {
    logic [2:0] runs;      // reassigned runs, 0..6 (0 on a wicket)
    logic       wicket;    // a wicket fell
    logic       boundary;  // the ball scored 4 or 6
  } ball_outcome_t;

  // Which team won, and the rule that decided it.
  typedef enum logic [1:0] {
    WIN_NONE  = 2'd0,   // match not finished
    WIN_TEAM1 = 2'd1,
    WIN_TEAM2 = 2'd2,
    WIN_TIE   = 2'd3
  } winner_e;

  typedef enum logic [1:0] {
    BY_RUNS       = 2'd0,
    BY_WICKETS    = 2'd1,
    BY_BOUNDARIES = 2'd2,
    BY_NOTHING    = 2'd3    // tied on all three, or no result yet
  } win_reason_e;

endpackage

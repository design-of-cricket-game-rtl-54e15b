// cricket_top: the cricket game and the cricket score-board side by side.
//
// Two independent designs share a clock and reset. The game (cricket_game)
// plays a two-team match from a 4-bit LFSR, one ball per clock, and names the
// winner. The score-board (scoreboard) keeps runs, wickets, extras and balls
// from push-button events. Every total of both is converted to decimal and
// brought out as seven-segment patterns as well as in binary: for the game
// each team's score and wickets ("out") and the balls of the current innings,
// for the score-board its four totals. Putting both designs under one top,
// with a display per total, follows the document's description; the port
// names, the shared clock and the digit counts are this design's choices.
//
// Interface: see the port list; *_seg ports are arrays of digit patterns
// {g,f,e,d,c,b,a}, active high, index 0 the units digit.
// Timing: game as in cricket_game, score-board as in scoreboard; the displays
// are combinational from the registered totals.
module cricket_top
  import cricket_pkg::*;
#(
  parameter logic [3:0]  SEED        = 4'b0001,
  parameter int unsigned MAX_BALLS   = MAX_BALLS_DEFAULT,
  parameter int unsigned MAX_WICKETS = MAX_WICKETS_DEFAULT
) (
  input  logic            clk,
  input  logic            rst,

  // Game.
  input  logic            restart,
  input  logic            play,
  output logic            team1,
  output logic            team2,
  output score_t          team1_score,
  output wickets_t        team1_out,
  output score_t          team2_score,
  output wickets_t        team2_out,
  output balls_t          game_balls,
  output logic [3:0]      lfsr_o,
  output logic [2:0]      lfsr_a,
  output logic            game_over,
  output winner_e         winner,
  output win_reason_e     win_reason,
  output logic [2:0][6:0] team1_score_seg,
  output logic [1:0][6:0] team1_out_seg,
  output logic [2:0][6:0] team2_score_seg,
  output logic [1:0][6:0] team2_out_seg,
  output logic [2:0][6:0] game_balls_seg,

  // Score-board.
  input  logic            sb_enable,
  input  logic            dot,
  input  logic            one,
  input  logic            four,
  input  logic            six,
  input  logic            wide,
  input  logic            noball,
  input  logic            wick,
  input  logic            ball,
  output score_t          sb_score,
  output wickets_t        sb_wickets,
  output extras_t         sb_extras,
  output balls_t          sb_balls,
  output logic [2:0][6:0] sb_score_seg,
  output logic [1:0][6:0] sb_wickets_seg,
  output logic [1:0][6:0] sb_extras_seg,
  output logic [2:0][6:0] sb_balls_seg
);

  logic wicket_unused;

  cricket_game #(.SEED(SEED), .MAX_BALLS(MAX_BALLS), .MAX_WICKETS(MAX_WICKETS)) u_game (
    .clk, .rst, .restart, .play,
    .team1, .team2,
    .team1_score, .team1_out, .team2_score, .team2_out,
    .balls      (game_balls),
    .o          (lfsr_o),
    .a          (lfsr_a),
    .wicket     (wicket_unused),
    .game_over, .winner, .win_reason
  );

  scoreboard #(.MAX_WICKETS(MAX_WICKETS)) u_board (
    .clk, .rst,
    .enable (sb_enable),
    .dot, .one, .four, .six, .wide, .noball, .wick, .ball,
    .score   (sb_score),
    .wickets (sb_wickets),
    .extras  (sb_extras),
    .balls   (sb_balls)
  );

  decimal_display #(.WIDTH(SCORE_W),  .DIGITS(3)) u_t1s (.bin(team1_score), .bcd(), .seg(team1_score_seg));
  decimal_display #(.WIDTH(WICKET_W), .DIGITS(2)) u_t1o (.bin(team1_out),   .bcd(), .seg(team1_out_seg));
  decimal_display #(.WIDTH(SCORE_W),  .DIGITS(3)) u_t2s (.bin(team2_score), .bcd(), .seg(team2_score_seg));
  decimal_display #(.WIDTH(WICKET_W), .DIGITS(2)) u_t2o (.bin(team2_out),   .bcd(), .seg(team2_out_seg));
  decimal_display #(.WIDTH(BALLS_W),  .DIGITS(3)) u_gb  (.bin(game_balls),  .bcd(), .seg(game_balls_seg));

  decimal_display #(.WIDTH(SCORE_W),  .DIGITS(3)) u_sbs (.bin(sb_score),    .bcd(), .seg(sb_score_seg));
  decimal_display #(.WIDTH(WICKET_W), .DIGITS(2)) u_sbw (.bin(sb_wickets),  .bcd(), .seg(sb_wickets_seg));
  decimal_display #(.WIDTH(EXTRAS_W), .DIGITS(2)) u_sbe (.bin(sb_extras),   .bcd(), .seg(sb_extras_seg));
  decimal_display #(.WIDTH(BALLS_W),  .DIGITS(3)) u_sbb (.bin(sb_balls),    .bcd(), .seg(sb_balls_seg));

endmodule

// cricket_game: a two-team cricket match played by a random number generator.
//
// A 4-bit LFSR runs freely, one step per clock. While a team bats, every clock
// is one ball: the LFSR number of that clock is reassigned to runs or a wicket
// (lfsr_reassign) and recorded by that team's innings_scorer. Team 1 bats
// first; when its innings closes (10 wickets or 120 balls) team 2 bats from
// wherever the LFSR then stands, and when team 2's innings closes the match is
// over and winner_compare names the winner (runs, then wickets, then
// boundaries). Because the LFSR keeps running while the game is idle, the
// match played depends on the clock at which play is pressed. The LFSR, the
// reassignment, the limits and the comparison order follow the document; the
// controller (states, the play / restart buttons, the free-running LFSR) is
// this design's own.
//
// Interface: clk; synchronous active-high rst (also reseeds the LFSR);
// restart returns to idle and clears both teams' totals; play starts a match
// from idle. team1 / team2 show who is batting; per-team score and wickets
// ("out"); balls of the innings in progress (or of team 2's once finished);
// o and a show the LFSR number and its runs; game_over, winner, win_reason.
// Timing: the first ball is the clock after play is sampled; an innings of N
// balls takes N clocks, and one clock passes between the last ball of team 1
// and the first of team 2.
module cricket_game
  import cricket_pkg::*;
#(
  parameter logic [3:0]  SEED        = 4'b0001,
  parameter int unsigned MAX_BALLS   = MAX_BALLS_DEFAULT,
  parameter int unsigned MAX_WICKETS = MAX_WICKETS_DEFAULT
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        restart,
  input  logic        play,
  output logic        team1,
  output logic        team2,
  output score_t      team1_score,
  output wickets_t    team1_out,
  output score_t      team2_score,
  output wickets_t    team2_out,
  output balls_t      balls,
  output logic [3:0]  o,
  output logic [2:0]  a,
  output logic        wicket,
  output logic        game_over,
  output winner_e     winner,
  output win_reason_e win_reason
);

  typedef enum logic [1:0] {IDLE, BAT1, BAT2, OVER} state_e;
  state_e state;

  logic   boundary, done1, done2;
  balls_t balls1, balls2, bnd1, bnd2;

  lfsr4 #(.SEED(SEED)) u_lfsr (
    .clk, .rst,
    .en     (1'b1),
    .q      (o),
    .serial ()
  );

  lfsr_reassign u_reassign (
    .o, .a, .wicket, .boundary
  );

  innings_scorer #(.MAX_BALLS(MAX_BALLS), .MAX_WICKETS(MAX_WICKETS)) u_team1 (
    .clk, .rst,
    .clr        (restart),
    .bowl       (state == BAT1),
    .a, .wicket, .boundary,
    .score      (team1_score),
    .wickets    (team1_out),
    .balls      (balls1),
    .boundaries (bnd1),
    .done       (done1)
  );

  innings_scorer #(.MAX_BALLS(MAX_BALLS), .MAX_WICKETS(MAX_WICKETS)) u_team2 (
    .clk, .rst,
    .clr        (restart),
    .bowl       (state == BAT2),
    .a, .wicket, .boundary,
    .score      (team2_score),
    .wickets    (team2_out),
    .balls      (balls2),
    .boundaries (bnd2),
    .done       (done2)
  );

  always_ff @(posedge clk) begin
    if (rst || restart) begin
      state <= IDLE;
    end else begin
      unique case (state)
        IDLE: if (play)  state <= BAT1;
        BAT1: if (done1) state <= BAT2;
        BAT2: if (done2) state <= OVER;
        OVER: ;
      endcase
    end
  end

  assign team1     = (state == BAT1);
  assign team2     = (state == BAT2);
  assign game_over = (state == OVER);
  assign balls     = (state == BAT2 || state == OVER) ? balls2 : balls1;

  // Only one team bats at a time, and only one innings is open at once.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!(team1 && team2)) else $error("both teams batting");
    end
  end

  winner_compare u_winner (
    .valid  (game_over),
    .s1     (team1_score), .s2 (team2_score),
    .w1     (team1_out),   .w2 (team2_out),
    .b1     (bnd1),        .b2 (bnd2),
    .winner (winner),
    .reason (win_reason)
  );

endmodule

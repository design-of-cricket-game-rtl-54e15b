// innings_scorer: keeps the totals of one team's innings in the cricket game.
//
// Every clock with bowl high is one ball. The ball's reassigned runs are added
// to the 8-bit score through a ripple-carry adder, a wicket ball steps the
// 4-bit wicket counter, and the ball counter steps on every ball. The innings
// is over (done) once MAX_WICKETS wickets have fallen or MAX_BALLS balls have
// been bowled; after that further balls change nothing. Runs, wickets, the
// 120-ball / 10-wicket limits and the 8-bit score adder follow the document.
// The boundary count (fours and sixes) is kept for the final tie-break the
// document describes; how it is counted is this design's choice.
//
// Interface: clk; synchronous rst and clr clear all totals; bowl, a, wicket,
// boundary describe the ball of this clock; score, wickets, balls, boundaries
// and done are registered totals.
// Timing: a ball sampled at a rising edge is in the totals right after that
// edge; done rises on the edge that records the last ball.
module innings_scorer
  import cricket_pkg::*;
#(
  parameter int unsigned MAX_BALLS   = MAX_BALLS_DEFAULT,
  parameter int unsigned MAX_WICKETS = MAX_WICKETS_DEFAULT
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       clr,
  input  logic       bowl,
  input  logic [2:0] a,
  input  logic       wicket,
  input  logic       boundary,
  output score_t     score,
  output wickets_t   wickets,
  output balls_t     balls,
  output balls_t     boundaries,
  output logic       done
);

  logic   all_out, overs_done, take;
  score_t score_next;

  assign done = all_out || overs_done;
  assign take = bowl && !done;

  // Score accumulator: score + a through the 8-bit adder.
  ripple_adder #(.WIDTH(SCORE_W)) u_score_add (
    .a   (score),
    .b   (SCORE_W'(a)),
    .cin (1'b0),
    .sum (score_next),
    .cout()
  );

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      score <= '0;
    end else if (take && !wicket) begin
      score <= score_next;
    end
  end

  sat_up_counter #(.WIDTH(WICKET_W), .LIMIT(MAX_WICKETS)) u_wickets (
    .clk, .rst, .clr,
    .inc      (take && wicket),
    .count    (wickets),
    .at_limit (all_out)
  );

  sat_up_counter #(.WIDTH(BALLS_W), .LIMIT(MAX_BALLS)) u_balls (
    .clk, .rst, .clr,
    .inc      (take),
    .count    (balls),
    .at_limit (overs_done)
  );

  sat_up_counter #(.WIDTH(BALLS_W), .LIMIT((1 << BALLS_W) - 1)) u_boundaries (
    .clk, .rst, .clr,
    .inc      (take && boundary && !wicket),
    .count    (boundaries),
    .at_limit ()
  );

  // The counters stop at their limits, so the totals never pass them.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (wickets <= WICKET_W'(MAX_WICKETS) && balls <= BALLS_W'(MAX_BALLS))
        else $error("innings totals past their limits: %0d wickets, %0d balls", wickets, balls);
    end
  end

endmodule

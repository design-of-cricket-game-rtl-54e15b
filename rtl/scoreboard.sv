// scoreboard: the cricket score-board ("display system").
//
// Eight one-bit inputs describe what happened on a delivery, and the board
// keeps four binary totals. Each rising clock with enable high:
//   one    adds 1 to the score          four adds 4, six adds 6
//   wide   adds 1 to the score and 1 to the extras, no ball counted
//   noball adds 1 to the score and 1 to the extras, no ball counted
//   wick   adds 1 to the wickets (they stop at 10)
//   ball   adds 1 to the balls bowled
//   dot    adds nothing: a dot ball only counts through ball
// Inputs that are high together all take effect in the same clock, so a
// delivery is normally "ball" plus its result. The increments and the 8-bit
// score / ball count and 4-bit wickets / extras follow the document; the
// totals are summed with ripple-carry adders, 8 bits wide for the score as the
// document says. These are this design's own choices: ball is ignored in a
// clock in which wide or noball is high (the document says a wide or no ball
// leaves the ball count unchanged), wickets stop at 10, score, extras and
// balls wrap at their width, and rst is synchronous.
//
// Interface: clk, rst (synchronous, active high), enable, the eight event
// inputs, and the registered totals score, wickets, extras, balls.
// Timing: an event sampled at a rising edge shows in the totals right after
// that edge.
module scoreboard
  import cricket_pkg::*;
#(
  parameter int unsigned MAX_WICKETS = MAX_WICKETS_DEFAULT
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     enable,
  input  logic     dot,
  input  logic     one,
  input  logic     four,
  input  logic     six,
  input  logic     wide,
  input  logic     noball,
  input  logic     wick,
  input  logic     ball,
  output score_t   score,
  output wickets_t wickets,
  output extras_t  extras,
  output balls_t   balls
);

  logic     extra_ball, legal_ball, take_wicket;
  score_t   run_inc, score_next;
  extras_t  extras_inc, extras_next;
  wickets_t wickets_next;
  balls_t   balls_next;

  assign extra_ball  = wide || noball;
  assign legal_ball  = ball && !extra_ball;
  assign take_wicket = wick && (wickets != WICKET_W'(MAX_WICKETS));

  // Runs of this delivery: 1, 4 and 6 from the bat, 1 for each extra.
  always_comb begin
    run_inc = '0;
    if (one)    run_inc = run_inc + SCORE_W'(1);
    if (four)   run_inc = run_inc + SCORE_W'(4);
    if (six)    run_inc = run_inc + SCORE_W'(6);
    if (wide)   run_inc = run_inc + SCORE_W'(1);
    if (noball) run_inc = run_inc + SCORE_W'(1);
  end
  assign extras_inc = EXTRAS_W'(wide) + EXTRAS_W'(noball);

  ripple_adder #(.WIDTH(SCORE_W)) u_score_add (
    .a (score), .b (run_inc), .cin (1'b0), .sum (score_next), .cout ()
  );
  ripple_adder #(.WIDTH(EXTRAS_W)) u_extras_add (
    .a (extras), .b (extras_inc), .cin (1'b0), .sum (extras_next), .cout ()
  );
  ripple_adder #(.WIDTH(WICKET_W)) u_wickets_add (
    .a (wickets), .b ('0), .cin (take_wicket), .sum (wickets_next), .cout ()
  );
  ripple_adder #(.WIDTH(BALLS_W)) u_balls_add (
    .a (balls), .b ('0), .cin (legal_ball), .sum (balls_next), .cout ()
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      score   <= '0;
      wickets <= '0;
      extras  <= '0;
      balls   <= '0;
    end else if (enable) begin
      score   <= score_next;
      wickets <= wickets_next;
      extras  <= extras_next;
      balls   <= balls_next;
    end
  end

endmodule

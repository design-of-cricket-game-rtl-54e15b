// sat_up_counter: synchronous up counter that stops at LIMIT.
//
// Each clock with inc high the count goes up by one, unless it already equals
// LIMIT, where it holds. The game uses it as the 4-bit wicket counter that
// stops at 10 (the document's choice) and, with other parameters, as the ball
// counter of an innings.
//
// Interface: clk; synchronous active-high rst and clr both return the count to
// zero; inc; count; at_limit = (count == LIMIT).
// Timing: count changes on the rising clock edge; at_limit is combinational
// from count.
module sat_up_counter #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned LIMIT = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             inc,
  output logic [WIDTH-1:0] count,
  output logic             at_limit
);

  assign at_limit = (count == WIDTH'(LIMIT));

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      count <= '0;
    end else if (inc && !at_limit) begin
      count <= count + WIDTH'(1);
    end
  end

endmodule

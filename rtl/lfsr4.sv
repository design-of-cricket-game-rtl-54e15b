// lfsr4: 4-bit linear feedback shift register, the random number source of the
// cricket game.
//
// Four shift-register stages X1..X4 share one clock. Each enabled clock every
// stage takes the value of the one before it, and X1 takes the XOR of X3 and
// X4. That is the polynomial x^4 + x^3 + 1, which is primitive, so from any
// non-zero seed the register walks through all 15 non-zero states before it
// repeats; the all-zero state is never reached (and would lock the register).
// The stage chain and the XOR taps follow the document's block diagram; the
// seed value and the reading of the state as the number {X1,X2,X3,X4} (X1 the
// most significant bit) are this design's own choices.
//
// Interface: clk, synchronous active-high rst (loads SEED), en (shift this
// clock), q = {X1,X2,X3,X4}, serial = X4 (the serial output sequence).
// Timing: q changes on the rising clock edge after en is sampled high.
module lfsr4 #(
  parameter logic [3:0] SEED = 4'b0001
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  output logic [3:0] q,
  output logic       serial
);

  logic x1, x2, x3, x4;

  always_ff @(posedge clk) begin
    if (rst) begin
      {x1, x2, x3, x4} <= (SEED == 4'b0000) ? 4'b0001 : SEED;
    end else if (en) begin
      x1 <= x3 ^ x4;
      x2 <= x1;
      x3 <= x2;
      x4 <= x3;
    end
  end

  assign q      = {x1, x2, x3, x4};
  assign serial = x4;

endmodule

// lfsr_reassign: turns a 4-bit LFSR number into the outcome of one ball.
//
// The 16 numbers are split as the document's table gives: 0..6 score that many
// runs, 10..15 score 1..6 runs (the number minus nine), and 7, 8 and 9 are a
// wicket with no runs. The boundary flag (a 4 or a 6) is this design's
// addition; the winner comparison needs it to break a tie on runs and wickets.
//
// Interface: o (LFSR number) in; a (runs 0..6), wicket, boundary out.
// Timing: purely combinational.
module lfsr_reassign (
  input  logic [3:0] o,
  output logic [2:0] a,
  output logic       wicket,
  output logic       boundary
);

  always_comb begin
    a      = 3'd0;
    wicket = 1'b0;
    unique case (o) inside
      [4'd0 : 4'd6]:   a = o[2:0];
      [4'd7 : 4'd9]:   wicket = 1'b1;
      [4'd10 : 4'd15]: a = 3'(o - 4'd9);
    endcase
    boundary = (a == 3'd4) || (a == 3'd6);
  end

endmodule

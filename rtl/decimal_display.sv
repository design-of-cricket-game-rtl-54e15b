// decimal_display: shows a binary total as decimal digits on seven-segment
// displays.
//
// The totals of the game and of the score board are kept in binary; for
// display they are converted to decimal (bin2bcd, shift-and-add-3) and each
// digit drives one seven-segment pattern (seg7_decoder). The conversion to
// decimal before display follows the document, whose gate-level drawing shows
// two-digit seven-segment displays ("digit10", "digit 1"); the conversion
// method, the digit count and the segment encoding are this design's choices.
//
// Interface: bin in; bcd[i] decimal digit i (bcd[0] the units); seg[i] its
// pattern {g,f,e,d,c,b,a}, active high.
// Timing: purely combinational.
module decimal_display #(
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned DIGITS = 3
) (
  input  logic [WIDTH-1:0]       bin,
  output logic [DIGITS-1:0][3:0] bcd,
  output logic [DIGITS-1:0][6:0] seg
);

  bin2bcd #(.WIDTH(WIDTH), .DIGITS(DIGITS)) u_bcd (
    .bin, .bcd
  );

  for (genvar d = 0; d < DIGITS; d++) begin : g_digit
    seg7_decoder u_seg (
      .digit (bcd[d]),
      .seg   (seg[d])
    );
  end

endmodule

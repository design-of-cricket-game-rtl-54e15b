// seg7_decoder: one decimal digit to a seven-segment pattern.
//
// Segments are {g,f,e,d,c,b,a}, active high, in the usual layout (a at the
// top, going clockwise, g in the middle). Codes 10..15 light only segment g
// (a dash); they do not occur when the input comes from bin2bcd. The
// encoding is this design's choice.
//
// Interface: digit in, seg out. Timing: purely combinational.
module seg7_decoder (
  input  logic [3:0] digit,
  output logic [6:0] seg
);

  always_comb begin
    unique case (digit)
      4'd0:    seg = 7'b0111111;
      4'd1:    seg = 7'b0000110;
      4'd2:    seg = 7'b1011011;
      4'd3:    seg = 7'b1001111;
      4'd4:    seg = 7'b1100110;
      4'd5:    seg = 7'b1101101;
      4'd6:    seg = 7'b1111101;
      4'd7:    seg = 7'b0000111;
      4'd8:    seg = 7'b1111111;
      4'd9:    seg = 7'b1101111;
      default: seg = 7'b1000000;
    endcase
  end

endmodule

// bin2bcd: binary to decimal digits by the shift-and-add-3 method.
//
// The binary value is shifted in one bit at a time, most significant first,
// into a row of 4-bit decimal digits; before each shift every digit that is 5
// or more gets 3 added, so it carries correctly into the next digit when
// doubled. After WIDTH shifts the row holds the decimal value. The loop is
// unrolled into combinational logic. DIGITS must be large enough for
// 2^WIDTH - 1 (3 digits for 8 bits); higher digits that the value cannot
// reach stay zero. The document asks only that binary totals be converted to
// decimal for display; the method is this design's choice.
//
// Interface: bin in; bcd[i] is decimal digit i, bcd[0] the units.
// Timing: purely combinational.
module bin2bcd #(
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned DIGITS = 3
) (
  input  logic [WIDTH-1:0]           bin,
  output logic [DIGITS-1:0][3:0]     bcd
);

  always_comb begin
    logic [4*DIGITS-1:0] r;
    r = '0;
    for (int i = WIDTH - 1; i >= 0; i--) begin
      for (int d = 0; d < DIGITS; d++) begin
        if (r[4*d +: 4] >= 4'd5) r[4*d +: 4] = r[4*d +: 4] + 4'd3;
      end
      r = {r[4*DIGITS-2:0], bin[i]};
    end
    bcd = r;
  end

endmodule

// decimal_display_tb: every 8-bit value through the decimal display.
//
// For all 256 inputs the three digits are compared with the value's
// hundreds, tens and units, and each digit's segment pattern with a digit
// font written out here; a 4-bit, two-digit instance is checked the same way.
module decimal_display_tb;
  logic [7:0] bin;
  logic [2:0][3:0] bcd;
  logic [2:0][6:0] seg;
  logic [3:0] bin4;
  logic [1:0][3:0] bcd4;
  logic [1:0][6:0] seg4;
  int checks = 0, failures = 0;

  decimal_display dut (.bin, .bcd, .seg);
  decimal_display #(.WIDTH(4), .DIGITS(2)) dut4 (.bin(bin4), .bcd(bcd4), .seg(seg4));

  // {g,f,e,d,c,b,a} for 0..9.
  localparam logic [6:0] FONT [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66,
                                       7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int d [3];
      bin = 8'(v);
      bin4 = 4'(v);
      #1;
      d[0] = v % 10; d[1] = (v / 10) % 10; d[2] = v / 100;
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (bcd[k] != 4'(d[k]) || seg[k] != FONT[d[k]]) begin
          failures++;
          $display("FAIL: %0d digit %0d: bcd %0d seg %h", v, k, bcd[k], seg[k]);
        end
      end
      if (v < 16) begin
        checks++;
        if (bcd4[0] != 4'(v % 10) || bcd4[1] != 4'(v / 10) ||
            seg4[0] != FONT[v % 10] || seg4[1] != FONT[v / 10]) begin
          failures++;
          $display("FAIL: 4-bit %0d", v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

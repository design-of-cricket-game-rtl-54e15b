// ripple_adder_tb: checks the adder at its default 8 bits exhaustively over
// both carry-in values, and a 4-bit instance exhaustively, against the
// simulator's own arithmetic.
module ripple_adder_tb;
  logic [7:0] a8, b8, s8;
  logic [3:0] a4, b4, s4;
  logic cin, c8, c4;
  int checks = 0, failures = 0;

  ripple_adder dut8 (.a(a8), .b(b8), .cin, .sum(s8), .cout(c8));
  ripple_adder #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .cin, .sum(s4), .cout(c4));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 2; ci++) begin
      for (int x = 0; x < 256; x++) begin
        for (int y = 0; y < 256; y++) begin
          a8 = 8'(x); b8 = 8'(y); cin = 1'(ci);
          a4 = 4'(x); b4 = 4'(y);
          #1;
          checks++;
          if ({c8, s8} != 9'(x + y + ci)) begin
            failures++;
            if (failures < 10) $display("FAIL 8-bit: %0d + %0d + %0d = %0d", x, y, ci, {c8, s8});
          end
          if (x < 16 && y < 16) begin
            checks++;
            if ({c4, s4} != 5'(x + y + ci)) begin
              failures++;
              if (failures < 10) $display("FAIL 4-bit: %0d + %0d + %0d = %0d", x, y, ci, {c4, s4});
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

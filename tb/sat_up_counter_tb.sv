// sat_up_counter_tb: the 4-bit counter stopping at 10 (the wicket counter).
//
// Counts with inc held and with inc toggling, checks that the count stops at
// 10 with at_limit set, that clr and rst return it to zero, and that a second
// instance counting balls stops at 120.
module sat_up_counter_tb;
  logic clk = 1'b0;
  logic rst, clr, inc, inc_b;
  logic [3:0] count;
  logic [7:0] count_b;
  logic at_limit, at_limit_b;
  int checks = 0, failures = 0;

  sat_up_counter dut (.clk, .rst, .clr, .inc, .count, .at_limit);
  sat_up_counter #(.WIDTH(8), .LIMIT(120)) dut_b (
    .clk, .rst, .clr, .inc(inc_b), .count(count_b), .at_limit(at_limit_b));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model;
    rst = 1'b1; clr = 1'b0; inc = 1'b0; inc_b = 1'b0;
    @(posedge clk); #1;
    check(count == 0 && count_b == 0, "reset");
    rst = 1'b0;
    model = 0;
    for (int i = 0; i < 30; i++) begin
      inc = (i % 3 != 2);
      @(posedge clk); #1;
      if (inc && model < 10) model++;
      check(count == 4'(model), $sformatf("count %0d want %0d", count, model));
      check(at_limit == (model == 10), "at_limit");
    end
    clr = 1'b1;
    @(posedge clk); #1;
    check(count == 0, "clr");
    clr = 1'b0; inc = 1'b0; inc_b = 1'b1;
    for (int i = 0; i < 130; i++) begin
      @(posedge clk); #1;
      check(count_b == 8'((i + 1 > 120) ? 120 : i + 1), $sformatf("ball count %0d", count_b));
    end
    check(at_limit_b, "balls stop at 120");
    check(count == 0, "inc low holds");
    rst = 1'b1;
    @(posedge clk); #1;
    check(count_b == 0, "rst clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// lfsr_reassign_tb: exhaustive test of the LFSR-number-to-ball table.
//
// All 16 numbers are applied and compared with the table written out here by
// hand: runs for 0..6 and 10..15, a wicket for 7, 8 and 9, and the boundary
// flag for the numbers that give 4 or 6 runs.
module lfsr_reassign_tb;
  logic [3:0] o;
  logic [2:0] a;
  logic wicket, boundary;
  int checks = 0, failures = 0;

  lfsr_reassign dut (.o, .a, .wicket, .boundary);

  //                               0  1  2  3  4  5  6  7  8  9 10 11 12 13 14 15
  localparam int RUNS [16]   = '{0, 1, 2, 3, 4, 5, 6, 0, 0, 0, 1, 2, 3, 4, 5, 6};
  localparam bit WKT  [16]   = '{0, 0, 0, 0, 0, 0, 0, 1, 1, 1, 0, 0, 0, 0, 0, 0};
  localparam bit BND  [16]   = '{0, 0, 0, 0, 1, 0, 1, 0, 0, 0, 0, 0, 0, 1, 0, 1};

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      o = 4'(v);
      #1;
      checks++;
      if (a != 3'(RUNS[v]) || wicket != WKT[v] || boundary != BND[v]) begin
        failures++;
        $display("FAIL: o=%0d a=%0d wicket=%0d boundary=%0d", v, a, wicket, boundary);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

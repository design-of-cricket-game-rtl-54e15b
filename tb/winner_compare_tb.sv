// winner_compare_tb: the three-step winner rule.
//
// Directed cases for each rule (runs, then fewer wickets, then boundaries,
// then a tie) and for valid low, then random totals drawn from small ranges so
// that ties on runs and wickets are common, compared with a model here.
module winner_compare_tb;
  import cricket_pkg::*;
  logic valid;
  score_t s1, s2;
  wickets_t w1, w2;
  balls_t b1, b2;
  winner_e winner;
  win_reason_e reason;
  int checks = 0, failures = 0;

  winner_compare dut (.valid, .s1, .s2, .w1, .w2, .b1, .b2, .winner, .reason);

  task automatic apply(input int S1, S2, W1, W2, B1, B2,
                       input winner_e ew, input win_reason_e er);
    valid = 1'b1;
    s1 = 8'(S1); s2 = 8'(S2); w1 = 4'(W1); w2 = 4'(W2); b1 = 8'(B1); b2 = 8'(B2);
    #1;
    checks++;
    if (winner != ew || reason != er) begin
      failures++;
      $display("FAIL: %0d/%0d b%0d vs %0d/%0d b%0d: got %s %s want %s %s",
               S1, W1, B1, S2, W2, B2, winner.name(), reason.name(), ew.name(), er.name());
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(150, 149, 10, 3, 0, 9, WIN_TEAM1, BY_RUNS);
    apply(20, 200, 0, 10, 9, 0, WIN_TEAM2, BY_RUNS);
    apply(100, 100, 4, 7, 1, 9, WIN_TEAM1, BY_WICKETS);
    apply(100, 100, 8, 7, 9, 1, WIN_TEAM2, BY_WICKETS);
    apply(77, 77, 10, 10, 5, 4, WIN_TEAM1, BY_BOUNDARIES);
    apply(77, 77, 10, 10, 4, 5, WIN_TEAM2, BY_BOUNDARIES);
    apply(77, 77, 10, 10, 4, 4, WIN_TIE, BY_NOTHING);
    valid = 1'b0;
    #1;
    checks++;
    if (winner != WIN_NONE || reason != BY_NOTHING) begin
      failures++;
      $display("FAIL: valid low");
    end
    for (int i = 0; i < 2000; i++) begin
      int S1, S2, W1, W2, B1, B2;
      winner_e ew;
      win_reason_e er;
      S1 = $urandom_range(40, 43); S2 = $urandom_range(40, 43);
      W1 = $urandom_range(8, 10);  W2 = $urandom_range(8, 10);
      B1 = $urandom_range(0, 2);   B2 = $urandom_range(0, 2);
      if (S1 > S2)      begin ew = WIN_TEAM1; er = BY_RUNS; end
      else if (S2 > S1) begin ew = WIN_TEAM2; er = BY_RUNS; end
      else if (W1 < W2) begin ew = WIN_TEAM1; er = BY_WICKETS; end
      else if (W2 < W1) begin ew = WIN_TEAM2; er = BY_WICKETS; end
      else if (B1 > B2) begin ew = WIN_TEAM1; er = BY_BOUNDARIES; end
      else if (B2 > B1) begin ew = WIN_TEAM2; er = BY_BOUNDARIES; end
      else              begin ew = WIN_TIE;   er = BY_NOTHING; end
      apply(S1, S2, W1, W2, B1, B2, ew, er);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

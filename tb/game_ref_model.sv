// game_ref_model: clock-by-clock reference model of the cricket game, used by
// the game and top-level testbenches.
//
// It keeps its own copy of the LFSR (x4 + x3 + 1, state {X1,X2,X3,X4}), the
// number-to-ball table, both teams' totals, the batting state and the winner
// rule, steps them on every rising clock edge from the same inputs as the
// design, and one time unit later compares all of the design's outputs with
// its own. It counts its checks and failures and how often each mechanism
// happened: innings ending all out or at the ball limit, and matches won by
// each team on runs, on wickets and on boundaries. The game length in clocks
// is checked too: a match of b1 and b2 balls ends b1 + b2 + 2 clocks after
// play is sampled.
module game_ref_model
  import cricket_pkg::*;
#(
  parameter logic [3:0]  SEED        = 4'b0001,
  parameter int unsigned MAX_BALLS   = 120,
  parameter int unsigned MAX_WICKETS = 10
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        restart,
  input  logic        play,
  input  logic        team1,
  input  logic        team2,
  input  score_t      team1_score,
  input  wickets_t    team1_out,
  input  score_t      team2_score,
  input  wickets_t    team2_out,
  input  balls_t      balls,
  input  logic [3:0]  o,
  input  logic [2:0]  a,
  input  logic        game_over,
  input  winner_e     winner,
  input  win_reason_e win_reason
);

  int checks = 0, failures = 0;
  int games = 0, all_out = 0, ball_limit = 0;
  int win1 = 0, win2 = 0, ties = 0;
  int by_runs = 0, by_wickets = 0, by_boundaries = 0;

  int         st;              // 0 idle, 1 team 1 bats, 2 team 2 bats, 3 over
  logic [3:0] q;
  int         s [2], w [2], b [2], bd [2];
  int         clocks;          // clocks since play was taken

  function automatic bit innings_done(int t);
    return w[t] == int'(MAX_WICKETS) || b[t] == int'(MAX_BALLS);
  endfunction

  function automatic void clear_totals();
    for (int t = 0; t < 2; t++) begin
      s[t] = 0; w[t] = 0; b[t] = 0; bd[t] = 0;
    end
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL (%m): %s", what);
    end
  endtask

  always @(posedge clk) begin
    int runs;
    bit wk;
    winner_e     ew;
    win_reason_e er;
    // Outcome of the number the LFSR shows in this clock.
    if (q <= 4'd6)      begin runs = int'(q);     wk = 0; end
    else if (q <= 4'd9) begin runs = 0;           wk = 1; end
    else                begin runs = int'(q) - 9; wk = 0; end

    if (rst) begin
      q = (SEED == 4'b0000) ? 4'b0001 : SEED;
      st = 0;
      clear_totals();
    end else begin
      if (restart) begin
        st = 0;
        clear_totals();
      end else begin
        case (st)
          0: if (play) begin st = 1; clocks = 0; end
          1, 2: begin
            int t;
            t = st - 1;
            if (innings_done(t)) begin
              if (w[t] == int'(MAX_WICKETS)) all_out++; else ball_limit++;
              st++;
            end else begin
              b[t]++;
              if (wk) w[t]++;
              else begin
                s[t] += runs;
                if (runs == 4 || runs == 6) bd[t]++;
              end
            end
          end
          default: ;
        endcase
      end
      q = {q[1] ^ q[0], q[3], q[2], q[1]};
    end
    if (st != 0) clocks++;

    // Expected result.
    ew = WIN_NONE;
    er = BY_NOTHING;
    if (st == 3) begin
      if (s[0] != s[1])        begin ew = (s[0] > s[1]) ? WIN_TEAM1 : WIN_TEAM2;   er = BY_RUNS; end
      else if (w[0] != w[1])   begin ew = (w[0] < w[1]) ? WIN_TEAM1 : WIN_TEAM2;   er = BY_WICKETS; end
      else if (bd[0] != bd[1]) begin ew = (bd[0] > bd[1]) ? WIN_TEAM1 : WIN_TEAM2; er = BY_BOUNDARIES; end
      else                     begin ew = WIN_TIE; end
    end

    #1;
    chk(o == q, $sformatf("LFSR %b want %b", o, q));
    chk(team1 == (st == 1) && team2 == (st == 2) && game_over == (st == 3),
        $sformatf("state: team1 %0d team2 %0d over %0d, model %0d", team1, team2, game_over, st));
    chk(team1_score == score_t'(s[0]) && team1_out == wickets_t'(w[0]) &&
        team2_score == score_t'(s[1]) && team2_out == wickets_t'(w[1]),
        $sformatf("totals %0d-%0d / %0d-%0d, model %0d-%0d / %0d-%0d",
                  team1_score, team1_out, team2_score, team2_out, s[0], w[0], s[1], w[1]));
    chk(balls == balls_t'((st >= 2) ? b[1] : b[0]), "balls of current innings");
    chk(winner == ew && win_reason == er, "winner");
    if (st == 3 && $rose(game_over)) begin
      chk(clocks - 1 == b[0] + b[1] + 2, $sformatf("match took %0d clocks after play", clocks - 1));
      games++;
      case (ew)
        WIN_TEAM1: win1++;
        WIN_TEAM2: win2++;
        default:   ties++;
      endcase
      case (er)
        BY_RUNS:       by_runs++;
        BY_WICKETS:    by_wickets++;
        BY_BOUNDARIES: by_boundaries++;
        default: ;
      endcase
    end
  end

endmodule

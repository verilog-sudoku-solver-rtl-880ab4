// tb_sudoku_solver: self-checking test of sudoku_solver.
//
// Runs a set of puzzles given as 81-character strings ('.' or '0' for an
// empty cell): a puzzle that needs only single placements, an easy one, an
// intermediate one, one that plain elimination cannot finish, the 17-clue
// "world's hardest" puzzle that needs guessing and backtracking, the empty
// board (it overflows the default 16-entry stack and must end with
// invalid; a second instance with a 64-entry stack must make up a full grid
// by guessing), and two
// contradictory boards that must end with invalid. A solution is accepted
// when every row, column and square holds 1..9 and every clue is kept; for
// the example puzzle the result is also compared with its published
// solution. The hardest puzzle must finish within 10,000 clock cycles, the
// figure reported for the original hardware. Counts of each solving
// technique are collected over the run and each must have acted at least once.
module tb_sudoku_solver;
  import sudoku_pkg::*;

  logic clk = 1'b0;
  logic rst, load;
  board_t board_in, board_out;
  logic done, invalid;
  solver_events_t ev;

  int checks = 0, failures = 0;
  int n_single = 0, n_cline = 0, n_naked = 0, n_hidden = 0, n_guess = 0, n_back = 0;

  sudoku_solver dut (
    .clk(clk), .rst(rst), .load(load), .board_in(board_in),
    .board_out(board_out), .done(done), .invalid(invalid), .events(ev)
  );

  // A deeper-stack instance for the empty board, which needs more nested
  // guesses than the default stack holds.
  logic   load2 = 1'b0;
  board_t board_out2;
  logic   done2, invalid2;
  solver_events_t ev2;
  sudoku_solver #(.MAX_GUESSES(64)) dut_deep (
    .clk(clk), .rst(rst), .load(load2), .board_in('0),
    .board_out(board_out2), .done(done2), .invalid(invalid2), .events(ev2)
  );
  int n_overflow = 0;
  always @(posedge clk) if (ev.overflow) n_overflow++;

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (ev.single_position) n_single++;
    if (ev.candidate_line)  n_cline++;
    if (ev.naked_group)     n_naked++;
    if (ev.hidden_group)    n_hidden++;
    if (ev.guess)           n_guess++;
    if (ev.backtrack)       n_back++;
  end

  initial begin
    #(10 * 1_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic board_t parse(input string s);
    board_t b;
    for (int i = 0; i < 81; i++) begin
      byte ch;
      ch = s[i];
      b[i / 9][i % 9] = (ch >= "1" && ch <= "9") ? digit_t'(ch - "0") : 4'd0;
    end
    return b;
  endfunction

  function automatic bit valid_solution(input board_t given, input board_t sol);
    for (int u = 0; u < 9; u++) begin
      int unsigned rm, cm, sm;
      rm = 0; cm = 0; sm = 0;
      for (int j = 0; j < 9; j++) begin
        int d;
        d = sol[u][j];  if (d < 1 || d > 9) return 0; rm |= 1 << d;
        d = sol[j][u];  if (d < 1 || d > 9) return 0; cm |= 1 << d;
        d = sol[(u / 3) * 3 + j / 3][(u % 3) * 3 + j % 3];
        if (d < 1 || d > 9) return 0; sm |= 1 << d;
      end
      if (rm != 'h3FE || cm != 'h3FE || sm != 'h3FE) return 0;
    end
    for (int r = 0; r < 9; r++)
      for (int c = 0; c < 9; c++)
        if (given[r][c] != 0 && given[r][c] != sol[r][c]) return 0;
    return 1;
  endfunction

  task automatic run_puzzle(input string name, input string puzzle, input bit expect_valid,
                       input int max_cycles, input string expected);
    board_t b;
    int cyc;
    b = parse(puzzle);
    @(negedge clk);
    board_in = b;
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    cyc = 0;
    while (!done && !invalid && cyc < 200_000) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (expect_valid) begin
      if (!done || invalid || !valid_solution(b, board_out)) begin
        failures++;
        $display("FAIL %s: done=%0b invalid=%0b after %0d cycles", name, done, invalid, cyc);
      end else begin
        $display("ok   %s solved in %0d cycles", name, cyc);
      end
      if (expected.len() == 81) begin
        checks++;
        if (board_out != parse(expected)) begin
          failures++;
          $display("FAIL %s: differs from the published solution", name);
        end
      end
    end else begin
      if (!invalid || done) begin
        failures++;
        $display("FAIL %s: expected invalid, done=%0b invalid=%0b", name, done, invalid);
      end else begin
        $display("ok   %s flagged invalid after %0d cycles", name, cyc);
      end
    end
    if (max_cycles > 0) begin
      checks++;
      if (cyc > max_cycles) begin
        failures++;
        $display("FAIL %s: %0d cycles, limit %0d", name, cyc, max_cycles);
      end
    end
  endtask

  initial begin
    rst = 1'b1;
    load = 1'b0;
    board_in = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // Solution with one cell removed per row: single placements only.
    run_puzzle("simple", "4265713.885729314.1394682.597138562.54372681.6821497.37946325.12658149.73189574.2",
          1, 200, "426571398857293146139468275971385624543726819682149753794632581265814937318957462");
    // Example puzzle of the design description, with its published solution.
    run_puzzle("example", ".2.5.1.9.8..2.3..6.3..6..7...1...6..54.....19..2...7...9..3..8.2..8.4..7.1.9.7.6.",
          1, 0, "426571398857293146139468275971385624543726819682149753794632581265814937318957462");
    // Needs candidate lines / groups on the way.
    run_puzzle("intermediate", "..9748...7.........2.1.9.....7...24..64.1.59..98...3.....8.3.2.........6...2759..",
          1, 0, "");
    // The 17-clue "world's hardest Sudoku".
    run_puzzle("hardest", "8..........36......7..9.2...5...7.......457.....1...3...1....68..85...1..9....4..",
          1, 10000, "");
    // A puzzle that defeats plain elimination; the combined per-cell rules
    // and the group scanner finish it without a guess. Any valid completion
    // that keeps its clues is accepted.
    run_puzzle("hard", "4.....8.5.3..........7......2.....6.....8.4......1.......6.3.7.5..2.....1.4......",
          1, 0, "");
    // Empty board: the default 16-entry stack overflows, which must end in invalid.
    run_puzzle("empty_overflow", ".................................................................................",
          0, 0, "");
    begin
      int cyc;
      @(negedge clk); load2 = 1'b1; @(negedge clk); load2 = 1'b0;
      cyc = 0;
      while (!done2 && !invalid2 && cyc < 100_000) begin @(negedge clk); cyc++; end
      checks++;
      if (!done2 || invalid2 || !valid_solution('0, board_out2)) begin
        failures++; $display("FAIL empty board with 64-entry stack");
      end else $display("ok   empty board filled in %0d cycles with a 64-entry stack", cyc);
    end
    // Two 5s in the first row: no solution.
    run_puzzle("duplicate", "55...............................................................................",
          0, 0, "");
    // Cell (0,0) has no candidate left: digits 1..8 in its row, 9 in its column.
    run_puzzle("no_candidate", ".123456789.......................................................................",
          0, 0, "");
    $display("events: single=%0d cand_line=%0d naked=%0d hidden=%0d guess=%0d backtrack=%0d",
             n_single, n_cline, n_naked, n_hidden, n_guess, n_back);
    checks++; if (n_single == 0) begin failures++; $display("FAIL no single position"); end
    checks++; if (n_cline == 0)  begin failures++; $display("FAIL no candidate line"); end
    checks++; if (n_naked == 0)  begin failures++; $display("FAIL no naked group"); end
    checks++; if (n_hidden == 0) begin failures++; $display("FAIL no hidden group"); end
    checks++; if (n_guess == 0)  begin failures++; $display("FAIL no guess"); end
    checks++; if (n_overflow == 0) begin failures++; $display("FAIL no overflow"); end
    checks++; if (n_back == 0)   begin failures++; $display("FAIL no backtrack"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

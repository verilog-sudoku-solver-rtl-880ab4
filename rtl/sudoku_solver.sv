// sudoku_solver: one-hot, all-cells-in-parallel Sudoku solver with guessing
// and backtracking.
//
// Every cell holds a 9-bit candidate mask in the possible-values register
// (pvr); a cell is solved when its mask is one-hot, so the digit sets of the
// 27 rows, columns and squares are plain ORs and no comparators are needed.
// Each clock, every unsolved cell in parallel:
//   * drops the digits already placed in its row, column and square;
//   * drops digits removed by candidate lines: for every square, the digits
//     that can sit only on one of its three rows (columns) are removed from
//     that row (column) in the other two squares of the band (stack);
//   * ANDs in its entry of the group mask register, written by group_fsm
//     (naked and hidden groups, one cell per clock);
//   * takes a digit at once if it is the only place for that digit in its
//     row, column or square (single position).
// When nothing has changed for DONE_COUNTDOWN cycles (one full sweep of the
// group scanner) and the board is not solved, the solver guesses. The cell
// with the fewest candidates, found by following the group scanner over the
// board, is fixed to its lowest candidate, extracted as M & -M. Before that
// the whole pvr, with the guessed digit removed from that cell, is pushed
// onto a stack of MAX_GUESSES entries. An error (a cell with no candidate,
// or a full row, column or square that does not hold all nine digits) pops
// the stack: pvr is restored from the top entry, which then tries the next
// candidate of the guessed cell. This is a depth-first search whose depth is
// bounded by the stack; an error with an empty stack means the puzzle has no
// solution, and a guess with a full stack sets overflow. Both end the run
// with invalid high.
//
// Interface: pulse load for one cycle with the puzzle on board_in (BCD, 0 for
// empty) to start. done rises when every row, column and square holds all
// nine digits; board_out is then the solution (unsolved cells read 0 while
// the search runs). invalid rises instead when no solution was found. Both
// stay high until the next load. events gives one-cycle flags of the
// techniques that acted, for displays and tests. Timing: one reduction step
// per clock; a guess costs the DONE_COUNTDOWN cycles of quiet that precede it.
//
// Follows the original design in the one-hot representation, the per-cell
// rules, the candidate lines, the separate sequential group scanner, the
// countdown of 81 quiet cycles, the M & -M guess, the stack of 16 pre-guess
// states and the error conditions. Own choices: the candidate-line masks are
// computed combinationally each cycle rather than held in registers, a
// single quiet counter replaces the 81 per-cell countdowns (equivalent: it
// counts cycles in which no cell changed), the error check also covers
// squares, and the group mask register is cleared on every guess and
// backtrack.
module sudoku_solver
  import sudoku_pkg::*;
#(
  parameter int unsigned MAX_GUESSES    = 16,
  parameter int unsigned DONE_COUNTDOWN = 81
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           load,
  input  board_t         board_in,
  output board_t         board_out,
  output logic           done,
  output logic           invalid,
  output solver_events_t events
);

  localparam int unsigned SPW = $clog2(MAX_GUESSES + 1);
  localparam int unsigned QW  = $clog2(DONE_COUNTDOWN + 1);
  localparam int unsigned IW  = $clog2(MAX_GUESSES);  // stack index width

  mask_t [8:0][8:0] pvr;
  mask_t [8:0][8:0] pvr_prevs [MAX_GUESSES];
  logic  [SPW-1:0]  sp;            // number of guesses on the stack
  logic             running;
  logic  [QW-1:0]   quiet;         // cycles without any change
  logic  [3:0]      best_n;        // fewest candidates seen since the last change
  logic  [3:0]      best_r, best_c;

  // group scanner
  mask_t [8:0][8:0] gmr;
  logic  [3:0]      pos_r, pos_c;
  logic             g_changed, g_naked, g_hidden, g_clear;

  // combinational reduction
  mask_t [8:0][8:0] pvr_next;
  logic  [8:0][8:0] solved;
  mask_t [8:0]      row_has, col_has, sq_has;      // digits placed
  mask_t [8:0]      row_one, col_one, sq_one;      // digits with exactly one place
  mask_t [8:0][2:0] seg_r, seg_c;                  // [square][line] candidates
  mask_t [8:0][2:0] only_r, only_c;                // digits confined to one line
  logic             any_change, any_error, all_done, any_single, any_cline;
  logic  [8:0]      row_full, col_full, sq_full;

  always_comb begin
    for (int r = 0; r < 9; r++)
      for (int c = 0; c < 9; c++)
        solved[r][c] = is_one_hot(pvr[r][c]);

    // Placed digits and single positions per unit.
    for (int u = 0; u < 9; u++) begin
      mask_t seen_r, seen_c, seen_s, twice_r, twice_c, twice_s;
      row_has[u] = '0; col_has[u] = '0; sq_has[u] = '0;
      seen_r = '0; seen_c = '0; seen_s = '0;
      twice_r = '0; twice_c = '0; twice_s = '0;
      row_full[u] = 1'b1; col_full[u] = 1'b1; sq_full[u] = 1'b1;
      for (int j = 0; j < 9; j++) begin
        int sr, sc;
        sr = (u / 3) * 3 + j / 3;
        sc = (u % 3) * 3 + j % 3;
        if (solved[u][j]) row_has[u] = row_has[u] | pvr[u][j];
        if (solved[j][u]) col_has[u] = col_has[u] | pvr[j][u];
        if (solved[sr][sc]) sq_has[u] = sq_has[u] | pvr[sr][sc];
        row_full[u] = row_full[u] & solved[u][j];
        col_full[u] = col_full[u] & solved[j][u];
        sq_full[u]  = sq_full[u] & solved[sr][sc];
        twice_r = twice_r | (seen_r & pvr[u][j]);
        twice_c = twice_c | (seen_c & pvr[j][u]);
        twice_s = twice_s | (seen_s & pvr[sr][sc]);
        seen_r  = seen_r | pvr[u][j];
        seen_c  = seen_c | pvr[j][u];
        seen_s  = seen_s | pvr[sr][sc];
      end
      row_one[u] = seen_r & ~twice_r;
      col_one[u] = seen_c & ~twice_c;
      sq_one[u]  = seen_s & ~twice_s;
    end

    // Candidate lines: per square, the candidates on each of its rows and
    // columns, and the digits that appear on only one of them.
    for (int s = 0; s < 9; s++) begin
      for (int k = 0; k < 3; k++) begin
        seg_r[s][k] = '0;
        seg_c[s][k] = '0;
        for (int j = 0; j < 3; j++) begin
          seg_r[s][k] = seg_r[s][k] | pvr[(s / 3) * 3 + k][(s % 3) * 3 + j];
          seg_c[s][k] = seg_c[s][k] | pvr[(s / 3) * 3 + j][(s % 3) * 3 + k];
        end
      end
      for (int k = 0; k < 3; k++) begin
        only_r[s][k] = seg_r[s][k] & ~seg_r[s][(k + 1) % 3] & ~seg_r[s][(k + 2) % 3];
        only_c[s][k] = seg_c[s][k] & ~seg_c[s][(k + 1) % 3] & ~seg_c[s][(k + 2) % 3];
      end
    end

    any_error  = 1'b0;
    any_single = 1'b0;
    any_cline  = 1'b0;
    for (int r = 0; r < 9; r++) begin
      for (int c = 0; c < 9; c++) begin
        int s;
        mask_t cl, cand, single;
        s  = (r / 3) * 3 + c / 3;
        cl = '0;
        for (int t = 0; t < 3; t++) begin
          if (t != c / 3) cl = cl | only_r[(r / 3) * 3 + t][r % 3];
          if (t != r / 3) cl = cl | only_c[t * 3 + c / 3][c % 3];
        end
        cand   = pvr[r][c] & ~row_has[r] & ~col_has[c] & ~sq_has[s] & gmr[r][c];
        single = cand & (row_one[r] | col_one[c] | sq_one[s]);
        if (solved[r][c]) begin
          pvr_next[r][c] = pvr[r][c];
        end else begin
          if ((cand & cl) != '0) any_cline = 1'b1;
          cand = cand & ~cl;
          single = single & ~cl;
          if (single != '0) begin
            pvr_next[r][c] = single;
            if (single != cand) any_single = 1'b1;
          end else begin
            pvr_next[r][c] = cand;
          end
        end
        if (pvr[r][c] == '0) any_error = 1'b1;
      end
    end
    for (int u = 0; u < 9; u++) begin
      if (row_full[u] && row_has[u] != ALL_ONES) any_error = 1'b1;
      if (col_full[u] && col_has[u] != ALL_ONES) any_error = 1'b1;
      if (sq_full[u] && sq_has[u] != ALL_ONES) any_error = 1'b1;
    end
    all_done   = (&row_full) && (&col_full) && (&sq_full) && !any_error;
    any_change = (pvr_next != pvr) || g_changed;
  end

  logic        guess_now, backtrack_now, overflow_now;
  mask_t       gm, glow;

  always_comb begin
    gm            = pvr[best_r][best_c];
    glow          = gm & (~gm + 9'd1);
    backtrack_now = running && any_error && (sp != '0);
    guess_now     = running && !any_error && !all_done && (quiet == QW'(DONE_COUNTDOWN)) &&
                    (best_n != 4'd10) && (sp != SPW'(MAX_GUESSES));
    overflow_now  = running && !any_error && !all_done && (quiet == QW'(DONE_COUNTDOWN)) &&
                    (sp == SPW'(MAX_GUESSES));
    g_clear       = load || guess_now || backtrack_now;
  end

  group_fsm u_group (
    .clk       (clk),
    .rst       (rst),
    .clear     (g_clear),
    .en        (running),
    .pvr       (pvr),
    .gmr       (gmr),
    .pos_r     (pos_r),
    .pos_c     (pos_c),
    .changed   (g_changed),
    .naked_hit (g_naked),
    .hidden_hit(g_hidden)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      done    <= 1'b0;
      invalid <= 1'b0;
      sp      <= '0;
      quiet   <= '0;
      best_n  <= 4'd10;
      best_r  <= '0;
      best_c  <= '0;
      for (int r = 0; r < 9; r++)
        for (int c = 0; c < 9; c++)
          pvr[r][c] <= ALL_ONES;
    end else if (load) begin
      running <= 1'b1;
      done    <= 1'b0;
      invalid <= 1'b0;
      sp      <= '0;
      quiet   <= '0;
      best_n  <= 4'd10;
      for (int r = 0; r < 9; r++)
        for (int c = 0; c < 9; c++)
          pvr[r][c] <= (board_in[r][c] != '0) ? one_hot(board_in[r][c]) : ALL_ONES;
    end else if (running) begin
      if (all_done) begin
        running <= 1'b0;
        done    <= 1'b1;
      end else if (any_error && sp == '0) begin
        running <= 1'b0;
        invalid <= 1'b1;
      end else if (backtrack_now) begin
        pvr    <= pvr_prevs[IW'(sp - SPW'(1))];
        sp     <= sp - SPW'(1);
        quiet  <= '0;
        best_n <= 4'd10;
      end else if (overflow_now) begin
        running <= 1'b0;
        invalid <= 1'b1;
      end else if (guess_now) begin
        pvr_prevs[IW'(sp)] <= pvr;
        pvr_prevs[IW'(sp)][best_r][best_c] <= gm & ~glow;
        pvr[best_r][best_c] <= glow;
        sp     <= sp + SPW'(1);
        quiet  <= '0;
        best_n <= 4'd10;
      end else begin
        pvr <= pvr_next;
        if (any_change) begin
          quiet  <= '0;
          best_n <= 4'd10;
        end else begin
          if (quiet != QW'(DONE_COUNTDOWN)) quiet <= quiet + QW'(1);
          if (!solved[pos_r][pos_c] &&
              (popcount9(pvr[pos_r][pos_c]) < best_n ||
               (popcount9(pvr[pos_r][pos_c]) == best_n &&
                {pos_r, pos_c} < {best_r, best_c}))) begin
            best_n <= popcount9(pvr[pos_r][pos_c]);
            best_r <= pos_r;
            best_c <= pos_c;
          end
        end
      end
    end
  end

  always_comb begin
    for (int r = 0; r < 9; r++)
      for (int c = 0; c < 9; c++)
        board_out[r][c] = to_digit(pvr[r][c]);
    events.single_position = running && !any_error && any_single;
    events.candidate_line  = running && !any_error && any_cline;
    events.naked_group     = g_naked;
    events.hidden_group    = g_hidden;
    events.guess           = guess_now && !backtrack_now;
    events.backtrack       = backtrack_now;
    events.overflow        = overflow_now;
  end

endmodule

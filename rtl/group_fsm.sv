// group_fsm: naked- and hidden-group detector for the Sudoku solver.
//
// The detector is too large to replicate for all 81 cells, so it visits one
// cell per clock, in row-major order, and writes its findings into the group
// mask register (gmr), one 9-bit mask per cell that the solver ANDs into the
// cell's candidates. For the visited cell with candidate mask M holding n
// candidates (1 < n < 9) it looks at the cell's row, column and square:
//   * naked group: if exactly n cells of the unit hold the very mask M, those
//     n cells must take the n digits of M, so every other cell of the unit
//     loses the digits of M (its gmr is ANDed with ~M);
//   * hidden group: if exactly n cells of the unit share at least one digit
//     with M (M AND mask is non-zero), the digits of M are confined to those
//     n cells, so each of them is restricted to M AND its own mask.
// This finds every naked group and every hidden group in which one member
// still holds the full set of the group's digits; other hidden groups go
// undetected, as in the original design. Findings from the three units of
// the visited cell are combined by AND in the same cycle.
//
// Interface: pvr is the solver's current candidate array. clear sets every
// gmr entry back to all ones (the solver uses it when it guesses or
// backtracks, because findings on an abandoned state are not valid). en
// lets the scan run. pos_r/pos_c name the cell visited in this cycle; the
// solver also uses this scan to find the cell with the fewest candidates.
// changed is high in a cycle whose gmr write removes at least one candidate
// that pvr still holds. naked_hit/hidden_hit pulse when a group is found that removes a candidate.
// Timing: one cell per cycle, a full sweep of the board every 81 cycles; gmr
// is registered, so a finding reaches the solver one cycle after the visit.
module group_fsm
  import sudoku_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clear,
  input  logic                 en,
  input  mask_t [8:0][8:0]     pvr,
  output mask_t [8:0][8:0]     gmr,
  output logic  [3:0]          pos_r,
  output logic  [3:0]          pos_c,
  output logic                 changed,
  output logic                 naked_hit,
  output logic                 hidden_hit
);

  mask_t            m;
  logic [3:0]       n;
  logic [3:0]       sq, br, bc;
  mask_t [2:0][8:0] unit;      // [0]=row, [1]=column, [2]=square members
  mask_t [2:0][8:0] upd;       // per-unit update masks for the members
  logic  [2:0]      naked_u, hidden_u;
  logic  [3:0]      n_same, n_share;
  mask_t [8:0][8:0] gmr_next;
  mask_t [8:0][8:0] keep;      // combined update mask of every cell

  always_comb begin
    m  = pvr[pos_r][pos_c];
    n  = popcount9(m);
    sq = square_of(pos_r, pos_c);
    br = 4'((int'(sq) / 3) * 3);
    bc = 4'((int'(sq) % 3) * 3);
    for (int j = 0; j < 9; j++) begin
      unit[0][j] = pvr[pos_r][j];
      unit[1][j] = pvr[j][pos_c];
      unit[2][j] = pvr[br + 4'(j / 3)][bc + 4'(j % 3)];
    end
    for (int u = 0; u < 3; u++) begin
      n_same  = '0;
      n_share = '0;
      for (int j = 0; j < 9; j++) begin
        n_same  = n_same + {3'b000, unit[u][j] == m};
        n_share = n_share + {3'b000, (unit[u][j] & m) != '0};
      end
      naked_u[u]  = (n > 4'd1) && (n < 4'd9) && (n_same == n);
      hidden_u[u] = (n > 4'd1) && (n < 4'd9) && (n_share == n) && !naked_u[u];
      for (int j = 0; j < 9; j++) begin
        upd[u][j] = ALL_ONES;
        if (naked_u[u] && unit[u][j] != m) upd[u][j] = ~m;
        if (hidden_u[u] && (unit[u][j] & m) != '0) upd[u][j] = m;
      end
    end
    gmr_next = gmr;
    changed  = 1'b0;
    begin
      for (int r = 0; r < 9; r++) begin
        for (int c = 0; c < 9; c++) begin
          keep[r][c] = ALL_ONES;
          if (4'(r) == pos_r) keep[r][c] = keep[r][c] & upd[0][c];
          if (4'(c) == pos_c) keep[r][c] = keep[r][c] & upd[1][r];
          if (square_of(4'(r), 4'(c)) == sq)
            keep[r][c] = keep[r][c] & upd[2][(r % 3) * 3 + (c % 3)];
          if (en) gmr_next[r][c] = gmr[r][c] & keep[r][c];
          if (en && (pvr[r][c] & ~keep[r][c]) != '0) changed = 1'b1;
        end
      end
    end
    naked_hit  = en && changed && (|naked_u);
    hidden_hit = en && changed && (|hidden_u);
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      for (int r = 0; r < 9; r++)
        for (int c = 0; c < 9; c++)
          gmr[r][c] <= ALL_ONES;
    end else begin
      gmr <= gmr_next;
    end
    if (rst) begin
      pos_r <= '0;
      pos_c <= '0;
    end else if (en) begin
      if (pos_c == 4'd8) begin
        pos_c <= '0;
        pos_r <= (pos_r == 4'd8) ? 4'd0 : pos_r + 4'd1;
      end else begin
        pos_c <= pos_c + 4'd1;
      end
    end
  end

endmodule

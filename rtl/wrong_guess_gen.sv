// wrong_guess_gen: tutorial-mode checker.
//
// Compares the board the user is filling in with the solved board, cell by
// cell. A cell is wrong when the user has entered a digit (non-zero) that
// differs from the solution. wrong_cells flags each such cell (bit 9*r+c);
// wrong_guess is high while the system is in its tutorial state and at
// least one cell is wrong, and turns the screen border red. Purely
// combinational. Follows the described behaviour (feedback when an entered
// number differs from the solved board); the per-cell output is added here.
module wrong_guess_gen
  import sudoku_pkg::*;
(
  input  board_t      input_board,
  input  board_t      solved_board,
  input  sys_state_t  state,
  output logic [80:0] wrong_cells,
  output logic        wrong_guess
);

  always_comb begin
    for (int r = 0; r < 9; r++)
      for (int c = 0; c < 9; c++)
        wrong_cells[r * 9 + c] = (input_board[r][c] != '0) &&
                                 (input_board[r][c] != solved_board[r][c]);
    wrong_guess = (state == ST_TUTORIAL) && (wrong_cells != '0);
  end

endmodule

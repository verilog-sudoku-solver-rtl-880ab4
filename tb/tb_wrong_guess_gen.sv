// tb_wrong_guess_gen: random boards against a reference model. A cell is
// wrong when it holds a non-zero digit that differs from the solution; the
// summary flag may only be high in the tutorial state.
module tb_wrong_guess_gen;
  import sudoku_pkg::*;
  board_t input_board, solved_board;
  sys_state_t state;
  logic [80:0] wrong_cells, exp_cells;
  logic wrong_guess;
  int checks = 0, failures = 0;

  wrong_guess_gen dut (.*);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n_wrong = 0;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 81; i++) begin
        int v;
        solved_board[i / 9][i % 9] = digit_t'($urandom_range(1, 9));
        v = $urandom_range(0, 9);
        // mostly empty or correct, sometimes wrong
        if (v < 4) input_board[i / 9][i % 9] = '0;
        else if (v < 8 || t % 3 == 0) input_board[i / 9][i % 9] = solved_board[i / 9][i % 9];
        else input_board[i / 9][i % 9] = digit_t'($urandom_range(1, 9));
      end
      state = (t % 2 == 0) ? ST_TUTORIAL : sys_state_t'($urandom_range(0, 8));
      #1;
      for (int i = 0; i < 81; i++)
        exp_cells[i] = input_board[i / 9][i % 9] != 0 &&
                       input_board[i / 9][i % 9] != solved_board[i / 9][i % 9];
      checks++;
      if (wrong_cells !== exp_cells) begin failures++; $display("FAIL cells, test %0d", t); end
      checks++;
      if (wrong_guess !== (state == ST_TUTORIAL && exp_cells != '0)) begin
        failures++; $display("FAIL flag, test %0d", t);
      end
      if (wrong_guess) n_wrong++;
    end
    checks++;
    if (n_wrong == 0) begin failures++; $display("FAIL never flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

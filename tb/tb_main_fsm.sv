// tb_main_fsm: walks the controller through its whole state sequence.
//
// IDLE -> CHOOSE_XY1 (corner moved left and down, one pixel per tick, not
// between ticks) -> CHOOSE_XY2 (corner moved right and up) -> RESIZING (one
// parser start pulse, wait for parser_done) -> RECOGNIZING (one recognizer
// start pulse, board copied on rec_done) -> FIXING (selection moved, digits
// stepped up and down with wrapping, selection clamped at the edge) ->
// SOLVING (one load pulse; a stale done flag from before the load is ignored;
// invalid returns to FIXING) -> SOLVING again -> OUTPUT -> TUTORIAL (digit
// chosen, written and cleared) and finally reset back to IDLE.
module tb_main_fsm;
  import sudoku_pkg::*;
  logic clk = 1'b0, rst;
  logic btnc_rise, btnl_rise, btnr_rise, btnu_rise, btnd_rise;
  logic btnl_cln, btnr_cln, btnu_cln, btnd_cln, btnc_held, edit_sw, tick;
  logic parser_done, rec_done, solver_done, solver_invalid;
  board_t recg_board, board;
  sys_state_t state;
  logic [9:0] x1, y1, x2, y2;
  logic [3:0] selected_x, selected_y;
  digit_t tutorial_guess;
  logic parser_start, rec_start, solver_load;
  int checks = 0, failures = 0;
  int n_parser_start = 0, n_rec_start = 0, n_load = 0;

  main_fsm dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    if (parser_start) n_parser_start++;
    if (rec_start) n_rec_start++;
    if (solver_load) n_load++;
  end

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state %0d)", what, state); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1'b1; @(negedge clk); s = 1'b0; @(negedge clk);
  endtask

  task automatic ticks(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); tick = 1'b1; @(negedge clk); tick = 1'b0;
      repeat (3) @(negedge clk);
    end
  endtask

  initial begin
    {btnc_rise, btnl_rise, btnr_rise, btnu_rise, btnd_rise} = '0;
    {btnl_cln, btnr_cln, btnu_cln, btnd_cln, btnc_held, edit_sw, tick} = '0;
    {parser_done, rec_done, solver_done, solver_invalid} = '0;
    for (int i = 0; i < 81; i++) recg_board[i / 9][i % 9] = digit_t'(i % 10);
    rst = 1'b1;
    @(negedge clk); @(negedge clk); rst = 1'b0;
    check(state == ST_IDLE && x1 == 110 && y1 == 24 && x2 == 541 && y2 == 455, "reset values");
    pulse(btnc_rise);
    check(state == ST_CHOOSE_XY1, "to CHOOSE_XY1");
    btnl_cln = 1'b1;
    repeat (20) @(negedge clk);
    check(x1 == 110, "no move without a tick");
    ticks(3);
    btnl_cln = 1'b0; btnd_cln = 1'b1;
    ticks(2);
    btnd_cln = 1'b0;
    check(x1 == 107 && y1 == 26, "first corner moved");
    pulse(btnc_rise);
    check(state == ST_CHOOSE_XY2, "to CHOOSE_XY2");
    btnr_cln = 1'b1; ticks(4); btnr_cln = 1'b0;
    btnu_cln = 1'b1; ticks(5); btnu_cln = 1'b0;
    check(x2 == 545 && y2 == 450 && x1 == 107, "second corner moved");
    pulse(btnc_rise);
    check(state == ST_RESIZING, "to RESIZING");
    repeat (10) @(negedge clk);
    check(n_parser_start == 1 && state == ST_RESIZING, "one parser start, waiting");
    pulse(parser_done);
    check(state == ST_RECOGNIZING, "to RECOGNIZING");
    repeat (10) @(negedge clk);
    check(n_rec_start == 1, "one recognizer start");
    pulse(rec_done);
    check(state == ST_FIXING && board == recg_board, "board copied, FIXING");
    check(selected_x == 4 && selected_y == 4, "selection starts in the centre");
    pulse(btnl_rise); pulse(btnu_rise); pulse(btnu_rise);
    check(selected_x == 3 && selected_y == 2, "selection moved");
    for (int i = 0; i < 6; i++) pulse(btnr_rise);
    check(selected_x == 8, "selection clamped at the right edge");
    pulse(btnc_rise);
    check(state == ST_FIXING, "a short centre press does not start the solver");
    // cell (2,8) holds (2*9+8)%10 = 6
    edit_sw = 1'b1;
    pulse(btnu_rise); pulse(btnu_rise); pulse(btnu_rise); pulse(btnu_rise);
    check(board[2][8] == 0, "digit 6 stepped up four times wraps to 0");
    pulse(btnd_rise);
    check(board[2][8] == 9, "digit 0 stepped down is 9");
    pulse(btnc_held);
    check(state == ST_FIXING, "no solve with the edit switch on");
    edit_sw = 1'b0;
    solver_done = 1'b1;   // stale done flag from an earlier run
    pulse(btnc_held);
    check(state == ST_SOLVING, "long press starts solving");
    solver_done = 1'b0;   // the solver clears its flags one clock after the load
    repeat (4) @(negedge clk);
    check(state == ST_SOLVING && n_load == 1, "one load pulse, stale done ignored");
    solver_invalid = 1'b1;
    @(negedge clk); @(negedge clk);
    check(state == ST_FIXING && n_load == 1, "invalid board returns to FIXING");
    solver_invalid = 1'b0;
    pulse(btnc_held);
    repeat (5) @(negedge clk);
    check(state == ST_SOLVING && n_load == 2, "solving again");
    pulse(solver_done);
    check(state == ST_OUTPUT, "to OUTPUT");
    edit_sw = 1'b1;
    @(negedge clk); @(negedge clk);
    check(state == ST_TUTORIAL, "to TUTORIAL");
    check(tutorial_guess == 1, "tutorial digit starts at 1");
    pulse(btnd_rise);
    check(tutorial_guess == 9, "tutorial digit wraps down to 9");
    pulse(btnu_rise); pulse(btnu_rise);
    check(tutorial_guess == 2, "tutorial digit wraps up to 2");
    pulse(btnc_rise);
    check(board[2][8] == 2, "tutorial digit written");
    pulse(btnl_rise);
    check(board[2][8] == 0 && selected_x == 8, "tutorial cell cleared");
    edit_sw = 1'b0;
    pulse(btnl_rise);
    check(selected_x == 7, "tutorial selection moves");
    @(negedge clk); rst = 1'b1; @(negedge clk); rst = 1'b0;
    check(state == ST_IDLE, "reset returns to IDLE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

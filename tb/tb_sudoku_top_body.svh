// tb_sudoku_top_body.svh: end-to-end test sequence of sudoku_top, shared by
// tb_sudoku_top (short debounce and crosshair timing) and tb_sudoku_top_full
// (every parameter at its default). The including module declares the
// localparams DEB, HELD and PS, equal to the top's DEBOUNCE_DELAY,
// HELD_DELAY and PRESCALE, then instantiates the top as dut after this file.
//
// Sequence, as a user would run the system:
//   1. In IDLE the camera ports write a picture of the 17-clue "hardest"
//      puzzle into the frame buffer, placed so that the frame parser's
//      samples for the chosen corners land on 16x16 seven-segment digits.
//   2. Centre button -> CHOOSE_XY1; the top-left crosshair is moved 3 left
//      and 3 down by holding buttons; centre -> CHOOSE_XY2; the bottom-right
//      one 4 right and 5 up; centre -> RESIZING. Holding a button moves a
//      corner one pixel per prescaler tick; the test releases the button so
//      that the ticks still seen during the debounce delay end on target.
//   3. The parser and recognizer run; the recognized board must equal the
//      puzzle, in FIXING.
//   4. With the edit switch the centre clue 4 is stepped to 5 (a
//      duplicate in its row); a long press must end in SOLVING and come back
//      to FIXING because the solver reports the board invalid. The digit is
//      stepped back and a second long press must solve the puzzle: OUTPUT,
//      a valid grid that keeps every clue, with guesses and backtracks seen.
//   5. Edit switch -> TUTORIAL; an empty cell gets a wrong digit (the
//      wrong-guess flag and a red screen border must appear), then the
//      right digit (the flag must clear).
//   6. Reset switch -> IDLE; with the video switch the screen must show the
//      thresholded 144x144 image.
// Each of these mechanisms is counted; a mechanism never seen is a failure.
  import sudoku_pkg::*;

  logic clk = 1'b0, cam_clk = 1'b0;
  logic [15:0] sw;
  logic btnc, btnl, btnr, btnu, btnd;
  logic cam_we;
  logic [18:0] cam_addr;
  logic [11:0] cam_data;
  logic capture_frame;
  logic [3:0] vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs;
  logic [9:0] hcount, vcount;
  logic [15:0] led;
  sys_state_t state;
  board_t solved_board;
  logic solver_done, solver_invalid;
  solver_events_t solver_events;

  always #5 clk = ~clk;
  always #4 cam_clk = ~cam_clk;

  int checks = 0, failures = 0;
  int n_move = 0, n_parse = 0, n_recog = 0, n_invalid = 0, n_solved = 0, n_guess = 0,
      n_back = 0, n_tut_wrong = 0, n_tut_right = 0, n_small = 0, n_reset = 0, n_edit = 0;

  localparam string PUZZLE =
    "8..........36......7..9.2...5...7.......457.....1...3...1....68..85...1..9....4..";
  localparam int X1 = 107, Y1 = 27, X2 = 545, Y2 = 450;  // corners after the moves

  board_t puzzle;

  always @(posedge clk) begin
    if (solver_events.guess) n_guess++;
    if (solver_events.backtrack) n_back++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state %0d)", what, state); end
  endtask

  task automatic wait_clocks(input int n);
    repeat (n) @(negedge clk);
  endtask

  // a press long enough to pass the debouncer, then a release
  task automatic press(ref logic b);
    b = 1'b1; wait_clocks(DEB + 8);
    b = 1'b0; wait_clocks(DEB + 8);
  endtask

  task automatic long_press();
    btnc = 1'b1;
    wait_clocks(HELD + 8);
    btnc = 1'b0;
  endtask

  // hold a direction button until the watched corner coordinate has made
  // n steps, counting the steps that still come during the release delay
  task automatic move(ref logic b, ref logic [9:0] coord, input int n);
    int steps, late;
    logic [9:0] last;
    late = 0;
    for (int m = 1; m * PS < DEB; m++) late++;
    if (n <= late) $fatal(1, "move of %0d steps is too short for this debounce delay", n);
    steps = 0;
    last = coord;
    b = 1'b1;
    while (steps < n - late) begin
      @(negedge clk);
      if (coord != last) begin steps++; last = coord; end
    end
    b = 1'b0;
    wait_clocks(DEB + 8);
  endtask

  function automatic bit valid_solution(input board_t given, input board_t sol);
    for (int u = 0; u < 9; u++) begin
      int unsigned rm, cm, sm;
      rm = 0; cm = 0; sm = 0;
      for (int j = 0; j < 9; j++) begin
        rm |= 1 << sol[u][j];
        cm |= 1 << sol[j][u];
        sm |= 1 << sol[(u / 3) * 3 + j / 3][(u % 3) * 3 + j % 3];
      end
      if (rm != 'h3FE || cm != 'h3FE || sm != 'h3FE) return 0;
    end
    for (int r = 0; r < 9; r++)
      for (int c = 0; c < 9; c++)
        if (given[r][c] != 0 && given[r][c] != sol[r][c]) return 0;
    return 1;
  endfunction

  function automatic bit ink_at(input int i, input int j);
    digit_t d;
    d = puzzle[j / 16][i / 16];
    return (d != 0) && glyph16(d, 4'(i % 16), 4'(j % 16));
  endfunction

  // writes the sampled pixels of the puzzle picture through the camera port
  task automatic draw_picture();
    for (int j = 0; j < 144; j++)
      for (int i = 0; i < 144; i++) begin
        int sx, sy;
        sx = X1 + (i * (X2 - X1)) / 144;
        sy = Y1 + (j * (Y2 - Y1)) / 144;
        @(negedge cam_clk);
        cam_we = 1'b1;
        cam_addr = 19'(sy * 640 + sx);
        cam_data = ink_at(i, j) ? 12'h112 : 12'hDDC;
      end
    // two known black pixels beside the picture for the crosshair check
    for (int k = 0; k < 2; k++) begin
      @(negedge cam_clk);
      cam_we = 1'b1;
      cam_addr = 19'(100 * 640 + X2 + k);
      cam_data = 12'h000;
    end
    @(negedge cam_clk);
    cam_we = 1'b0;
  endtask

  // pixel (x,y) leaves the VGA outputs two clocks after the counters show it
  task automatic vga_pixel(input int x, input int y, output logic [11:0] rgb);
    while (!(int'(hcount) == x + 2 && int'(vcount) == y)) @(negedge clk);
    rgb = {vga_r, vga_g, vga_b};
  endtask

  initial begin
    #(64'd10 * (64'd40_000 + 64'd80 * (DEB + 8) + 64'd4 * HELD + 64'd40 * PS) + 64'd100_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] px;
    int cyc, tr, tc;
    digit_t sol, wrong;
    for (int k = 0; k < 81; k++)
      puzzle[k / 9][k % 9] = (PUZZLE[k] == ".") ? 4'd0 : digit_t'(PUZZLE[k] - "0");
    sw = '0; {btnc, btnl, btnr, btnu, btnd} = '0;
    cam_we = 1'b0; cam_addr = '0; cam_data = '0;
    wait_clocks(40);
    check(state == ST_IDLE && capture_frame, "power-on reset ends in IDLE");

    // 1. picture
    draw_picture();

    // 2. corners
    press(btnc);
    check(state == ST_CHOOSE_XY1 && !capture_frame, "CHOOSE_XY1, frame frozen");
    move(btnl, dut.u_fsm.x1, 3);
    move(btnd, dut.u_fsm.y1, 3);
    check(dut.u_fsm.x1 == X1 && dut.u_fsm.y1 == Y1, "first corner moved");
    if (dut.u_fsm.x1 == X1 && dut.u_fsm.y1 == Y1) n_move++;
    press(btnc);
    check(state == ST_CHOOSE_XY2, "CHOOSE_XY2");
    move(btnr, dut.u_fsm.x2, 4);
    move(btnu, dut.u_fsm.y2, 5);
    check(dut.u_fsm.x2 == X2 && dut.u_fsm.y2 == Y2, "second corner moved");
    if (dut.u_fsm.x2 == X2 && dut.u_fsm.y2 == Y2) n_move++;
    // the crosshair of the moved corner is drawn inverted: the black pixel
    // written on its column shows white, and its neighbour stays black
    vga_pixel(X2, 100, px);
    check(px == 12'hFFF, "crosshair drawn inverted");
    vga_pixel(X2 + 1, 100, px);
    check(px == 12'h000, "no crosshair beside it");

    // 3. rescaling and recognition
    btnc = 1'b1; wait_clocks(DEB + 8); btnc = 1'b0;
    check(state == ST_RESIZING || state == ST_RECOGNIZING || state == ST_FIXING, "RESIZING");
    cyc = 0;
    while (state != ST_FIXING && cyc < 200_000) begin
      @(negedge clk); cyc++;
      if (dut.parser_done) n_parse++;
    end
    wait_clocks(DEB + 8);
    check(state == ST_FIXING, "rescale and recognition reach FIXING");
    check(dut.u_fsm.board == puzzle, "recognized board equals the picture");
    if (dut.u_fsm.board == puzzle) n_recog++;
    else
      for (int r = 0; r < 9; r++)
        for (int c = 0; c < 9; c++)
          if (dut.u_fsm.board[r][c] != puzzle[r][c])
            $display("  cell %0d,%0d read %0d, picture %0d", r, c, dut.u_fsm.board[r][c], puzzle[r][c]);

    // 4. an edit that makes the board invalid, then the fix and the solve
    sw[14] = 1'b1;
    press(btnu);
    check(dut.u_fsm.board[4][4] == 4'd5, "centre clue stepped to 5");
    if (dut.u_fsm.board[4][4] == 4'd5) n_edit++;
    sw[14] = 1'b0;
    btnc = 1'b1;
    cyc = 0;
    while (state != ST_SOLVING && cyc < HELD + 100) begin @(negedge clk); cyc++; end
    btnc = 1'b0;
    check(state == ST_SOLVING, "long press starts the solver");
    cyc = 0;
    while (!(state == ST_FIXING && solver_invalid) && cyc < 100_000) begin @(negedge clk); cyc++; end
    check(state == ST_FIXING && solver_invalid, "invalid board returns to FIXING");
    if (state == ST_FIXING && solver_invalid) n_invalid++;
    sw[14] = 1'b1;   // editing also keeps the still-held long press from restarting the solver
    press(btnd);
    check(dut.u_fsm.board == puzzle, "clue restored");
    wait_clocks(HELD + 8);
    sw[14] = 1'b0;
    wait_clocks(4);
    long_press();
    cyc = 0;
    while (state != ST_OUTPUT && cyc < 200_000) begin @(negedge clk); cyc++; end
    check(state == ST_OUTPUT && solver_done, "puzzle solved, OUTPUT");
    check(valid_solution(puzzle, solved_board), "solution is a valid grid keeping the clues");
    if (state == ST_OUTPUT && valid_solution(puzzle, solved_board)) n_solved++;
    // the solved digits are on screen: the solved board is what the display shows
    check(dut.u_video.board == solved_board, "display shows the solution");

    // 5. tutorial
    sw[14] = 1'b1;
    wait_clocks(4);
    check(state == ST_TUTORIAL, "TUTORIAL");
    sw[14] = 1'b0;
    press(btnl);                         // selection (4,4) -> (4,3), an empty cell
    tr = 4; tc = 3;
    check(dut.u_fsm.selected_x == 4'(tc) && puzzle[tr][tc] == 0, "empty cell selected");
    sol = solved_board[tr][tc];
    wrong = (sol == 4'd1) ? 4'd2 : 4'd1;
    sw[14] = 1'b1;
    if (wrong == 4'd2) press(btnu);
    press(btnc);
    check(dut.u_fsm.board[tr][tc] == wrong && led[7], "wrong digit flagged");
    vga_pixel(12, 10, px);
    check(px == 12'hF00, "red border on a wrong digit");
    if (led[7] && px == 12'hF00) n_tut_wrong++;
    for (int k = 0; k < 10 && dut.u_fsm.tutorial_guess != sol; k++) press(btnu);
    press(btnc);
    check(dut.u_fsm.board[tr][tc] == sol && !led[7], "right digit clears the flag");
    vga_pixel(12, 10, px);
    check(px == 12'h000, "black border on a right digit");
    if (!led[7] && px == 12'h000) n_tut_right++;
    sw[14] = 1'b0;

    // 6. reset and the rescaled-image view
    sw[15] = 1'b1; wait_clocks(4); sw[15] = 1'b0; wait_clocks(40);
    check(state == ST_IDLE, "reset switch returns to IDLE");
    if (state == ST_IDLE) n_reset++;
    sw[1] = 1'b1;
    begin
      int bad;
      bad = 0;
      for (int j = 0; j < 144; j += 5)
        for (int i = 0; i < 144; i += 7) begin
          vga_pixel(i, j, px);
          checks++;
          if (px != (ink_at(i, j) ? 12'h000 : 12'hFFF)) begin
            failures++; bad++;
            if (bad < 5) $display("FAIL small image pixel (%0d,%0d) %h", i, j, px);
          end
        end
      if (bad == 0) n_small++;
    end
    sw[1] = 1'b0;

    $display("mechanisms: move=%0d parse=%0d recognize=%0d edit=%0d invalid=%0d solved=%0d guess=%0d backtrack=%0d",
             n_move, n_parse, n_recog, n_edit, n_invalid, n_solved, n_guess, n_back);
    $display("            tutorial_wrong=%0d tutorial_right=%0d reset=%0d small_view=%0d",
             n_tut_wrong, n_tut_right, n_reset, n_small);
    check(n_move > 0, "mechanism: crosshair move");
    check(n_parse > 0, "mechanism: frame parser");
    check(n_recog > 0, "mechanism: character recognition");
    check(n_edit > 0, "mechanism: board edit");
    check(n_invalid > 0, "mechanism: invalid board");
    check(n_solved > 0, "mechanism: solve");
    check(n_guess > 0, "mechanism: guess");
    check(n_back > 0, "mechanism: backtrack");
    check(n_tut_wrong > 0, "mechanism: tutorial wrong guess");
    check(n_tut_right > 0, "mechanism: tutorial right guess");
    check(n_reset > 0, "mechanism: reset");
    check(n_small > 0, "mechanism: rescaled view");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

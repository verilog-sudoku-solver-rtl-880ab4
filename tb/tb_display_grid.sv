// tb_display_grid: compares the board renderer with a reference model,
// pixel by pixel over whole rows and at random points.
//
// The model is written from the drawing rules: black outside the 432x432
// board; a 1-pixel black line at the left/top edge of each 48-pixel cell,
// 2 pixels at square boundaries and at the right/bottom edge of the board;
// a 4/3-pixel green frame inside the selected cell in the fixing and
// tutorial states; seven-segment digits with 6-pixel strokes inside the box
// x 12..35, y 6..41 of the cell, black, or red for wrong cells in the
// tutorial state; white elsewhere. rgb_out must follow one clock after the
// position.
module tb_display_grid;
  import sudoku_pkg::*;
  logic clk = 1'b0;
  logic signed [10:0] x_in, y_in;
  board_t board;
  logic [3:0] selected_x, selected_y;
  sys_state_t state;
  logic [80:0] wrong_cells;
  logic [11:0] rgb_out;
  int checks = 0, failures = 0;
  int n_ink = 0, n_sel = 0, n_red = 0, n_white = 0;

  display_grid dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic bit seg_ink(input int d, input int lx, input int ly);
    bit a, b, c, dd, e, f, g;
    bit [6:0] s;
    case (d)
      1: s = 7'b0000110; 2: s = 7'b1011011; 3: s = 7'b1001111; 4: s = 7'b1100110;
      5: s = 7'b1101101; 6: s = 7'b1111101; 7: s = 7'b0000111; 8: s = 7'b1111111;
      9: s = 7'b1101111; default: s = '0;
    endcase
    if (lx < 12 || lx > 35 || ly < 6 || ly > 41) return 0;
    a  = s[0] && ly <= 11;
    b  = s[1] && lx >= 30 && ly <= 26;
    c  = s[2] && lx >= 30 && ly >= 21;
    dd = s[3] && ly >= 36;
    e  = s[4] && lx <= 17 && ly >= 21;
    f  = s[5] && lx <= 17 && ly <= 26;
    g  = s[6] && ly >= 21 && ly <= 26;
    return a | b | c | dd | e | f | g;
  endfunction

  function automatic logic [11:0] model(input int x, input int y);
    int cx, cy, lx, ly;
    if (x < 0 || y < 0 || x >= 432 || y >= 432) return 12'h000;
    cx = x / 48; cy = y / 48; lx = x % 48; ly = y % 48;
    if ((state == ST_FIXING || state == ST_TUTORIAL) && cx == selected_x && cy == selected_y &&
        (lx < 4 || ly < 4 || lx > 44 || ly > 44)) return 12'h0F0;
    if (lx == 0 || ly == 0) return 12'h000;
    if ((cx % 3 == 0 && lx == 1) || (cy % 3 == 0 && ly == 1) || x >= 430 || y >= 430) return 12'h000;
    if (seg_ink(board[cy][cx], lx, ly))
      return (state == ST_TUTORIAL && wrong_cells[cy * 9 + cx]) ? 12'hF00 : 12'h000;
    return 12'hFFF;
  endfunction

  task automatic check_pixel(input int x, input int y);
    logic [11:0] e;
    @(negedge clk);
    x_in = 11'(x); y_in = 11'(y);
    e = model(x, y);
    @(negedge clk);
    checks++;
    if (rgb_out !== e) begin
      failures++;
      if (failures < 10) $display("FAIL (%0d,%0d) got %h expected %h", x, y, rgb_out, e);
    end
    if (e == 12'h0F0) n_sel++;
    if (e == 12'hF00) n_red++;
    if (e == 12'hFFF) n_white++;
    if (e == 12'h000 && x >= 0 && y >= 0 && x < 432 && y < 432 && x % 48 > 2 && y % 48 > 2) n_ink++;
  endtask

  initial begin
    sys_state_t states [4] = '{ST_FIXING, ST_SOLVING, ST_OUTPUT, ST_TUTORIAL};
    x_in = '0; y_in = '0;
    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < 81; i++) begin
        board[i / 9][i % 9] = digit_t'($urandom_range(0, 9));
        wrong_cells[i] = ($urandom_range(0, 3) == 0);
      end
      if (t == 0) for (int i = 0; i < 9; i++) board[0][i] = digit_t'(i + 1);
      selected_x = 4'($urandom_range(0, 8)); selected_y = 4'($urandom_range(0, 8));
      if (t == 0) selected_y = 4'd0;
      state = states[t];
      // whole rows through the first cell row and the selected row
      for (int x = -4; x < 440; x++) check_pixel(x, 24);
      for (int x = 0; x < 432; x++) check_pixel(x, selected_y * 48 + 2);
      for (int k = 0; k < 5000; k++) check_pixel($urandom_range(0, 460) - 10, $urandom_range(0, 460) - 10);
    end
    checks++;
    if (n_ink == 0 || n_sel == 0 || n_red == 0 || n_white == 0) begin
      failures++; $display("FAIL coverage ink=%0d sel=%0d red=%0d white=%0d", n_ink, n_sel, n_red, n_white);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

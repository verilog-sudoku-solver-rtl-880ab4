// tb_video_playback: checks the VGA timing and the picture sources.
//
// Frame-buffer and rescaled-buffer models answer with a value computed from
// the address, after two and one clocks. Over a full frame it counts the
// sync pulses and their widths (96 clocks of hsync per 800-clock line, two
// lines of vsync per 525-line frame) and checks, for each visible pixel in
// a set of sampled lines: the live camera pixel in the idle state;
// inverted crosshair lines through the corner being moved; the red first
// crosshair while choosing the second corner; the thresholded small image
// with the video switch; the board (white cell interior, black grid line)
// and a red or black border in the board states; black while blanked.
module tb_video_playback;
  import sudoku_pkg::*;
  logic clk = 1'b0, rst;
  logic [18:0] fb_addr;
  logic [11:0] fb_data, rfb_data;
  logic [14:0] rfb_addr;
  logic [9:0] x1, y1, x2, y2, hcount, vcount;
  sys_state_t state;
  logic switch_vid, wrong_guess, hsync, vsync, blank;
  board_t board;
  logic [3:0] selected_x, selected_y;
  logic [80:0] wrong_cells;
  logic [11:0] rgb;
  logic [18:0] fa_q;
  int checks = 0, failures = 0;

  video_playback dut (.*);
  always #5 clk = ~clk;

  function automatic logic [11:0] fpix(input logic [18:0] a);
    return 12'(a * 13 + 5);
  endfunction
  function automatic logic [11:0] rpix(input logic [14:0] a);
    return 12'(a * 29);
  endfunction

  always_ff @(posedge clk) begin
    fa_q     <= fb_addr;
    fb_data  <= fpix(fa_q);
    rfb_data <= rpix(rfb_addr);
  end

  initial begin
    #100_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // position of the pixel now on the outputs: two clocks behind the counters
  int px, py;
  int hx [2], vy [2];
  always_ff @(posedge clk) begin
    hx[0] <= int'(hcount); vy[0] <= int'(vcount);
    hx[1] <= hx[0];        vy[1] <= vy[0];
  end
  assign px = hx[1];
  assign py = vy[1];

  function automatic logic [12:0] expected(  // bit 12: do not check
      input int x, input int y);
    int s;
    logic [11:0] r;
    if (x >= 640 || y >= 480) return 12'h000;
    if (state == ST_FIXING || state == ST_TUTORIAL || state == ST_OUTPUT || state == ST_SOLVING) begin
      if (x >= 104 && x < 536 && y >= 24 && y < 456) begin
        if ((state == ST_FIXING || state == ST_TUTORIAL) &&
            (x - 104) / 48 == selected_x && (y - 24) / 48 == selected_y)
          return 13'h1000;  // selected cell: checked in the display_grid test
        if ((x - 104) % 48 == 0 || (y - 24) % 48 == 0) return 12'h000;  // grid line
        if ((x - 104) % 48 == 40 && (y - 24) % 48 == 44 && board[(y - 24) / 48][(x - 104) / 48] == 0)
          return 12'hFFF;  // inside an empty, unselected cell
        return 13'h1000;    // other board pixels are checked in the display_grid test
      end
      return wrong_guess ? 12'hF00 : 12'h000;
    end
    if (switch_vid) begin
      if (x >= 144 || y >= 144) return 12'h000;
      r = rpix(15'(y * 144 + x));
      s = r[3:0] + r[7:4] + r[11:8];
      return s > 20 ? 12'hFFF : 12'h000;
    end
    r = fpix(19'(y * 640 + x));
    if (state == ST_CHOOSE_XY1 && (x == x1 || y == y1)) return {1'b0, ~r};
    if (state == ST_CHOOSE_XY2 && (x == x2 || y == y2)) return {1'b0, ~r};
    if (state == ST_CHOOSE_XY2 && (x == x1 || y == y1)) return 12'hF00;
    return r;
  endfunction

  int n_hs_low, n_vs_frames, cur_hs_run, n_lines_vs;
  task automatic run_frame(input string name);
    int hs_low, vs_low_clocks, bad;
    hs_low = 0; vs_low_clocks = 0; bad = 0;
    // align to the start of a frame at the outputs
    while (!(px == 0 && py == 0)) @(negedge clk);
    for (int k = 0; k < 800 * 525; k++) begin
      logic [12:0] e;
      if (!hsync) hs_low++;
      if (!vsync) vs_low_clocks++;
      checks++;
      if (hsync !== !(px >= 656 && px <= 751) || vsync !== !(py == 490 || py == 491) ||
          blank !== (px >= 640 || py >= 480)) begin
        failures++; bad++;
        if (bad < 4) $display("FAIL %s sync at (%0d,%0d)", name, px, py);
      end
      if (py % 37 == 3 || py == int'(y1) || py == int'(y2) || py == 24) begin
        e = expected(px, py);
        if (!e[12]) begin
          checks++;
          if (rgb !== e[11:0]) begin
            failures++; bad++;
            if (bad < 6) $display("FAIL %s pixel (%0d,%0d) got %h expected %h", name, px, py, rgb, e[11:0]);
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (hs_low != 96 * 525 || vs_low_clocks != 2 * 800) begin
      failures++; $display("FAIL %s sync widths: hsync %0d vsync %0d", name, hs_low, vs_low_clocks);
    end
    $display("%s frame checked, %0d errors", name, bad);
  endtask

  initial begin
    rst = 1'b1; switch_vid = 1'b0; wrong_guess = 1'b0; state = ST_IDLE;
    x1 = 10'd110; y1 = 10'd24; x2 = 10'd541; y2 = 10'd455;
    board = '0; board[0][1] = 4'd5; selected_x = 4'd3; selected_y = 4'd0; wrong_cells = '0;
    fa_q = '0;
    @(negedge clk); @(negedge clk); rst = 1'b0;
    run_frame("idle");
    state = ST_CHOOSE_XY1; x1 = 10'd200; y1 = 10'd77;
    run_frame("choose_xy1");
    state = ST_CHOOSE_XY2; x2 = 10'd300; y2 = 10'd151;
    run_frame("choose_xy2");
    switch_vid = 1'b1; state = ST_IDLE;
    run_frame("small image");
    switch_vid = 1'b0; state = ST_FIXING;
    run_frame("fixing");
    state = ST_TUTORIAL; wrong_guess = 1'b1;
    run_frame("tutorial wrong");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// video_playback: 640x480 VGA output of the whole system.
//
// Generates the standard 640x480 timing from the pixel clock: 800 clocks
// per line (640 visible, sync low from 656 to 751) and 525 lines per frame
// (480 visible, sync low on lines 490 and 491), both syncs active low.
// Per pixel it chooses what to show:
//   * in the fixing, solving, output and tutorial states the Sudoku board
//     from display_grid, centred on the screen, with the border outside the
//     board red while the tutorial reports a wrong entry (else black);
//   * with switch_vid set, the 144x144 rescaled image, thresholded to black
//     and white as the recognizer sees it;
//   * while choosing corners, the camera image with crosshair lines through
//     the corner being moved drawn in inverted colour, and, while choosing
//     the second corner, the first one's lines in red;
//   * otherwise the live camera image.
// Frame-buffer data returns two clocks after the address, so hsync, vsync,
// blanking and all overlays are delayed by two clocks to line up with it;
// the rescaled buffer answers after one clock and is re-registered once.
// Interface: video clock; fb_addr/fb_data to the camera frame buffer,
// rfb_addr/rfb_data to the rescaled buffer; corners, state, board and
// selection from the main FSM; rgb, hsync, vsync, and the raw counters.
// Follows the original in the timing numbers, the overlays and the 48-pixel
// centred board; the exact pipeline structure is this design's own.
module video_playback
  import sudoku_pkg::*;
#(
  parameter int unsigned TARGET = 144
) (
  input  logic        clk,
  input  logic        rst,
  output logic [18:0] fb_addr,
  input  logic [11:0] fb_data,
  output logic [14:0] rfb_addr,
  input  logic [11:0] rfb_data,
  input  logic [9:0]  x1,
  input  logic [9:0]  y1,
  input  logic [9:0]  x2,
  input  logic [9:0]  y2,
  input  sys_state_t  state,
  input  logic        switch_vid,
  input  board_t      board,
  input  logic [3:0]  selected_x,
  input  logic [3:0]  selected_y,
  input  logic [80:0] wrong_cells,
  input  logic        wrong_guess,
  output logic [9:0]  hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank,
  output logic [11:0] rgb
);

  localparam int CELL_PIXELS  = 48;
  localparam int GRID_PIXELS  = 9 * CELL_PIXELS;
  localparam int GRID_START_X = (640 - GRID_PIXELS) / 2;
  localparam int GRID_START_Y = (480 - GRID_PIXELS) / 2;

  typedef struct packed {
    logic       hs, vs, blank;
    logic       in_grid;
    logic       cross_move, cross_first;
    logic       in_small;
  } tag_t;

  tag_t        tag0, tag1, tag2;
  logic [11:0] grid_rgb, grid_rgb_q, rfb_q;

  // counters and stage-0 tags
  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (hcount == 10'd799) begin
      hcount <= '0;
      vcount <= (vcount == 10'd524) ? 10'd0 : vcount + 10'd1;
    end else begin
      hcount <= hcount + 10'd1;
    end
  end

  always_comb begin
    tag0.hs          = !(hcount >= 10'd656 && hcount <= 10'd751);
    tag0.vs          = !(vcount == 10'd490 || vcount == 10'd491);
    tag0.blank       = (hcount >= 10'd640) || (vcount >= 10'd480);
    tag0.in_grid     = (int'(hcount) >= GRID_START_X) && (int'(hcount) < GRID_START_X + GRID_PIXELS) &&
                       (int'(vcount) >= GRID_START_Y) && (int'(vcount) < GRID_START_Y + GRID_PIXELS);
    tag0.cross_move  = (state == ST_CHOOSE_XY1) ? (hcount == x1 || vcount == y1) :
                       (state == ST_CHOOSE_XY2) ? (hcount == x2 || vcount == y2) : 1'b0;
    tag0.cross_first = (state == ST_CHOOSE_XY2) && (hcount == x1 || vcount == y1);
    tag0.in_small    = (hcount < 10'(TARGET)) && (vcount < 10'(TARGET));
    fb_addr          = 19'(vcount) * 19'd640 + 19'(hcount);
    rfb_addr         = tag0.in_small ? 15'(15'(vcount) * 15'(TARGET) + 15'(hcount)) : 15'd0;
  end

  display_grid #(.CELL_PIXELS(CELL_PIXELS)) u_grid (
    .clk        (clk),
    .x_in       (11'(signed'({1'b0, hcount})) - 11'(GRID_START_X)),
    .y_in       (11'(signed'({1'b0, vcount})) - 11'(GRID_START_Y)),
    .board      (board),
    .selected_x (selected_x),
    .selected_y (selected_y),
    .state      (state),
    .wrong_cells(wrong_cells),
    .rgb_out    (grid_rgb)
  );

  always_ff @(posedge clk) begin
    tag1       <= tag0;
    tag2       <= tag1;
    grid_rgb_q <= grid_rgb;
    rfb_q      <= rfb_data;
  end

  logic [5:0]  rfb_sum;
  logic        board_view;

  always_comb begin
    rfb_sum    = 6'(rfb_q[3:0]) + 6'(rfb_q[7:4]) + 6'(rfb_q[11:8]);
    board_view = (state == ST_CONFIRMING) || (state == ST_FIXING) || (state == ST_SOLVING) ||
                 (state == ST_OUTPUT) || (state == ST_TUTORIAL);
    if (tag2.blank)                  rgb = 12'h000;
    else if (board_view)             rgb = tag2.in_grid ? grid_rgb_q : (wrong_guess ? 12'hF00 : 12'h000);
    else if (switch_vid)             rgb = !tag2.in_small ? 12'h000 : (rfb_sum > 6'd20 ? 12'hFFF : 12'h000);
    else if (tag2.cross_move)        rgb = ~fb_data;
    else if (tag2.cross_first)       rgb = 12'hF00;
    else                             rgb = fb_data;
    hsync = tag2.hs;
    vsync = tag2.vs;
    blank = tag2.blank;
  end

endmodule

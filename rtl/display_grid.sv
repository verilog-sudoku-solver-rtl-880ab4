// display_grid: pixel generator for the on-screen Sudoku board.
//
// Given the pixel position relative to the top-left corner of the board,
// it draws a 9x9 grid of CELL_PIXELS-square cells (432x432 pixels with the
// default 48): white background, thin black lines between cells, thicker
// lines around the 3x3 squares, and each non-zero digit as a black
// seven-segment glyph (sudoku_pkg::glyph16 scaled up by CELL_PIXELS/16).
// In the fixing and tutorial states the selected cell gets a green frame;
// in the output state no frame is drawn. In the tutorial state digits that
// differ from the solution (wrong_cells) are drawn red.
// Interface: x_in/y_in (signed, may lie outside the board, which gives
// black), board, selection, state, wrong_cells; rgb_out is 12-bit RGB.
// Timing: rgb_out is registered, one clock after the position.
// The 48-pixel cells, the digits drawn per cell from 48x48 images and the
// selection highlight follow the original; the glyph shapes, line widths
// and colours are this design's choices.
module display_grid
  import sudoku_pkg::*;
#(
  parameter int unsigned CELL_PIXELS = 48
) (
  input  logic               clk,
  input  logic signed [10:0] x_in,
  input  logic signed [10:0] y_in,
  input  board_t             board,
  input  logic [3:0]         selected_x,
  input  logic [3:0]         selected_y,
  input  sys_state_t         state,
  input  logic [80:0]        wrong_cells,
  output logic [11:0]        rgb_out
);

  localparam int GRID_PIXELS = 9 * CELL_PIXELS;
  localparam int SCALE       = CELL_PIXELS / 16;

  int         xi, yi, cx, cy, lx, ly;
  logic       in_board, on_line, thick, sel, ink;
  digit_t     d;
  logic [11:0] rgb;

  always_comb begin
    xi     = int'(x_in);
    yi     = int'(y_in);
    in_board = (xi >= 0) && (xi < GRID_PIXELS) && (yi >= 0) && (yi < GRID_PIXELS);
    cx     = in_board ? xi / CELL_PIXELS : 0;
    cy     = in_board ? yi / CELL_PIXELS : 0;
    lx     = in_board ? xi % CELL_PIXELS : 0;
    ly     = in_board ? yi % CELL_PIXELS : 0;
    thick  = ((cx % 3 == 0) && lx < 2) || ((cy % 3 == 0) && ly < 2) ||
             (xi >= GRID_PIXELS - 2) || (yi >= GRID_PIXELS - 2);
    on_line   = (lx == 0) || (ly == 0) || thick;
    d      = board[cy][cx];
    ink    = (d != '0) && glyph16(d, 4'(lx / SCALE), 4'(ly / SCALE));
    sel    = (state == ST_FIXING || state == ST_TUTORIAL) &&
             (4'(cx) == selected_x) && (4'(cy) == selected_y) &&
             (lx < 4 || ly < 4 || lx >= CELL_PIXELS - 3 || ly >= CELL_PIXELS - 3);
    if (!in_board)       rgb = 12'h000;
    else if (sel)      rgb = 12'h0F0;
    else if (on_line)     rgb = 12'h000;
    else if (ink)      rgb = (state == ST_TUTORIAL && wrong_cells[cy * 9 + cx]) ? 12'hF00 : 12'h000;
    else               rgb = 12'hFFF;
  end

  always_ff @(posedge clk) rgb_out <= rgb;

endmodule

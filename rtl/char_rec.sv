// char_rec: template-matching digit recognizer for the rescaled puzzle.
//
// The rescaled image is 144x144 pixels, so each of the 81 Sudoku cells is a
// 16x16 block. For every cell the recognizer streams its 256 pixels out of
// the rescaled buffer, one per clock with no gaps between cells, and turns
// each 12-bit RGB pixel into one bit: bright (paper) when R+G+B exceeds
// THRESHOLD. It keeps ten match scores per cell: for digits 1..9 the number
// of pixels whose bit agrees with that digit's 16x16 template (ink = dark),
// and for "empty" the number of bright pixels, which is the match against
// an all-paper template. When the last pixel of a cell arrives the highest
// score wins (ties go to the lower code, empty first) and its code, 0 for an
// empty cell, is written into the output board.
//
// Interface: start pulse; img_addr (y*144+x) to the rescaled buffer and
// img_data back, READ_LATENCY clocks later; recg_board holds the result,
// cell (r,c) in board_t order; busy while scanning, done pulses at the end.
// Timing: 81*256 + READ_LATENCY + 1 clocks per image.
//
// Follows the original in the threshold test, the 16x16 cells, the score of
// agreeing pixels per template, the blank-cell score and the continuous
// scan. The templates are seven-segment glyphs computed by
// sudoku_pkg::glyph16, because the font images of the original are not
// available, and the winner is a plain maximum: the per-digit score offsets
// the original tuned to its own font are left out.
module char_rec
  import sudoku_pkg::*;
#(
  parameter int unsigned THRESHOLD    = 20,
  parameter int unsigned IMG_WIDTH    = 144,
  parameter int unsigned READ_LATENCY = 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  output logic [14:0] img_addr,
  input  logic [11:0] img_data,
  output board_t      recg_board,
  output logic        busy,
  output logic        done
);

  typedef struct packed {
    logic       valid;
    logic [6:0] cell_idx;   // 0..80, row-major
    logic [3:0] px;
    logic [3:0] py;
  } tap_t;

  logic [6:0]  cell_idx;
  logic [3:0]  px, py;
  logic [3:0]  cr, cc;
  tap_t        tap [READ_LATENCY];
  tap_t        cur;
  logic [8:0]  score [10];
  logic [8:0]  nxt   [10];
  logic        bright;
  logic [9:0]  agree;
  logic [5:0]  rgb_sum;
  digit_t      best;

  always_comb begin
    cr       = 4'(int'(cell_idx) / 9);
    cc       = 4'(int'(cell_idx) % 9);
    img_addr = 15'((int'(cr) * 16 + int'(py)) * IMG_WIDTH + int'(cc) * 16 + int'(px));
    cur      = tap[READ_LATENCY-1];
    rgb_sum  = 6'(img_data[3:0]) + 6'(img_data[7:4]) + 6'(img_data[11:8]);
    bright   = rgb_sum > 6'(THRESHOLD);
    for (int d = 0; d < 10; d++) begin
      agree[d] = (d == 0) ? bright : (bright == !glyph16(digit_t'(d), cur.px, cur.py));
      nxt[d]   = ((cur.px == 4'd0 && cur.py == 4'd0) ? 9'd0 : score[d]) + {8'd0, agree[d]};
    end
    best = '0;
    for (int d = 1; d < 10; d++)
      if (nxt[d] > nxt[best]) best = digit_t'(d);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      cell_idx <= '0;
      px   <= '0;
      py   <= '0;
      for (int i = 0; i < READ_LATENCY; i++) tap[i] <= '0;
      for (int d = 0; d < 10; d++) score[d] <= '0;
      recg_board <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      // address generator
      if (start && !busy) begin
        busy <= 1'b1;
        cell_idx <= '0;
        px   <= '0;
        py   <= '0;
      end else if (busy && !(cell_idx == 7'd81)) begin
        px <= px + 4'd1;
        if (px == 4'd15) begin
          py <= py + 4'd1;
          if (py == 4'd15) cell_idx <= cell_idx + 7'd1;
        end
      end
      tap[0] <= '{valid: busy && cell_idx != 7'd81, cell_idx: cell_idx, px: px, py: py};
      for (int i = 1; i < READ_LATENCY; i++) tap[i] <= tap[i-1];
      // scoring on the returning data
      if (cur.valid) begin
        for (int d = 0; d < 10; d++) score[d] <= nxt[d];
        if (cur.px == 4'd15 && cur.py == 4'd15) begin
          recg_board[int'(cur.cell_idx) / 9][int'(cur.cell_idx) % 9] <= best;
          if (cur.cell_idx == 7'd80) begin
            done <= 1'b1;
            busy <= 1'b0;
          end
        end
      end
    end
  end

endmodule

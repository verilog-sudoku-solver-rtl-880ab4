// sudoku_pkg: types, constants and small functions shared by the Sudoku
// solver and the camera/display path.
//
// A board travels between blocks as board_t, 81 cells of 4-bit BCD (0 means
// empty). Cell (row r, column c) sits at bits [4*(9*r+c) +: 4], so the
// flattened 324-bit bus has row 0, column 0 in its least significant nibble.
// Inside the solver every cell is a 9-bit candidate mask (mask_t): bit v-1 is
// set while digit v is still possible, and a solved cell holds a one-hot mask.
//
// The digit glyph function draws digits as seven-segment shapes on a 16x16
// pixel cell. The same shapes serve as the character-recognition templates
// (16x16) and, scaled by three, as the 48x48 display digits. The shapes are
// this design's own choice; the font-based template images are not given.
package sudoku_pkg;


  typedef logic [8:0] mask_t;
  typedef logic [3:0] digit_t;
  typedef logic [8:0][8:0][3:0] board_t;  // [row][col] BCD digits

  localparam mask_t ALL_ONES = 9'h1FF;

  // System FSM states, numbered as in the state table of the design.
  typedef enum logic [3:0] {
    ST_IDLE        = 4'd0,
    ST_CHOOSE_XY1  = 4'd1,
    ST_CHOOSE_XY2  = 4'd2,
    ST_RESIZING    = 4'd3,
    ST_RECOGNIZING = 4'd4,
    ST_CONFIRMING  = 4'd5,
    ST_FIXING      = 4'd6,
    ST_SOLVING     = 4'd7,
    ST_OUTPUT      = 4'd8,
    ST_TUTORIAL    = 4'd9
  } sys_state_t;

  // One-cycle event flags of the solver, for status displays and tests.
  typedef struct packed {
    logic single_position;  // a cell was fixed because a digit fits nowhere else in a unit
    logic candidate_line;   // a candidate was removed by a candidate line
    logic naked_group;      // the group scanner removed candidates by a naked group
    logic hidden_group;     // the group scanner removed candidates by a hidden group
    logic guess;            // a guess was pushed on the stack
    logic backtrack;        // an error restored the state below the top of the stack
    logic overflow;         // a guess was needed with the stack full
  } solver_events_t;

  // BCD digit to one-hot mask; 0 (empty) gives 0.
  function automatic mask_t one_hot(input digit_t d);
    mask_t m;
    m = '0;
    if (d >= 4'd1 && d <= 4'd9) m[d-1] = 1'b1;
    return m;
  endfunction

  // One-hot mask to BCD digit; anything that is not one-hot gives 0.
  function automatic digit_t to_digit(input mask_t m);
    digit_t d;
    d = '0;
    for (int i = 0; i < 9; i++)
      if (m == mask_t'(1 << i)) d = digit_t'(i + 1);
    return d;
  endfunction

  function automatic logic [3:0] popcount9(input mask_t m);
    logic [3:0] n;
    n = '0;
    for (int i = 0; i < 9; i++) n = n + {3'b000, m[i]};
    return n;
  endfunction

  function automatic logic is_one_hot(input mask_t m);
    return (m != '0) && ((m & (m - 9'd1)) == '0);
  endfunction

  // Square index 0..8 of a cell, squares numbered row-major.
  function automatic logic [3:0] square_of(input logic [3:0] r, input logic [3:0] c);
    return 4'((int'(r) / 3) * 3 + int'(c) / 3);
  endfunction

  // Seven-segment glyph of digit d on a 16x16 cell: 1 where the digit has ink.
  // The glyph box spans columns 4..11 and rows 2..13 with strokes 2 pixels wide.
  function automatic logic glyph16(input digit_t d, input logic [3:0] x, input logic [3:0] y);
    logic [6:0] seg;  // {g,f,e,d,c,b,a}
    logic in_l, in_r, in_t, in_m, in_b, up, lo, hx, vy;
    case (d)
      4'd1: seg = 7'b0000110;
      4'd2: seg = 7'b1011011;
      4'd3: seg = 7'b1001111;
      4'd4: seg = 7'b1100110;
      4'd5: seg = 7'b1101101;
      4'd6: seg = 7'b1111101;
      4'd7: seg = 7'b0000111;
      4'd8: seg = 7'b1111111;
      4'd9: seg = 7'b1101111;
      default: seg = 7'b0000000;
    endcase
    hx   = (x >= 4'd4) && (x <= 4'd11);
    vy   = (y >= 4'd2) && (y <= 4'd13);
    in_l = (x == 4'd4) || (x == 4'd5);
    in_r = (x == 4'd10) || (x == 4'd11);
    in_t = (y == 4'd2) || (y == 4'd3);
    in_m = (y == 4'd7) || (y == 4'd8);
    in_b = (y == 4'd12) || (y == 4'd13);
    up   = (y >= 4'd2) && (y <= 4'd8);
    lo   = (y >= 4'd7) && (y <= 4'd13);
    return vy && hx && ((seg[0] && in_t) || (seg[1] && in_r && up) || (seg[2] && in_r && lo) ||
                        (seg[3] && in_b) || (seg[4] && in_l && lo) || (seg[5] && in_l && up) ||
                        (seg[6] && in_m));
  endfunction

endpackage

// main_fsm: system controller of the camera-based Sudoku solver.
//
// A linear sequence of states, advanced mostly by the centre button:
//   IDLE         live camera picture; centre -> CHOOSE_XY1
//   CHOOSE_XY1   picture frozen; the direction buttons move the top-left
//                crosshair one pixel per prescaler tick; centre -> CHOOSE_XY2
//   CHOOSE_XY2   the same for the bottom-right crosshair; centre -> RESIZING
//   RESIZING     starts the frame parser; when it is done -> RECOGNIZING
//   RECOGNIZING  starts character recognition; when done the recognized
//                board is copied into the working board -> FIXING
//   FIXING       the user corrects the board: direction buttons move the
//                selected cell; with the edit switch on, up/down step the
//                selected cell's digit (0..9, wrapping). A long centre press
//                (btnc_held) -> SOLVING
//   SOLVING      loads the solver; solver done -> OUTPUT, solver invalid ->
//                back to FIXING
//   OUTPUT       the solution is shown; the edit switch -> TUTORIAL
//   TUTORIAL     the user board is shown again; with the edit switch on,
//                up/down choose a digit 1..9, centre writes it into the
//                selected cell and left clears it; with it off the direction
//                buttons move the selection.
// The reset input returns to IDLE from anywhere. CONFIRMING keeps its
// number but is never entered.
// Interface: rising-edge pulses and debounced levels of the five buttons,
// the long-press level, the edit switch, the prescaler tick, and the done
// flags of frame parser, recognizer and solver; outputs the state, the
// corners, the selection, the working board, the tutorial digit and
// one-clock start pulses for the parser, the recognizer and the solver.
// The states, their numbers and their actions follow the original state
// table and corner defaults (110,24)-(541,455). Own choices: parser and
// recognizer start by themselves on entering their state, SOLVING moves on
// when the solver reports done, an unsolvable board returns to FIXING, and
// the up button is used where the original listing's buttons are unclear.
module main_fsm
  import sudoku_pkg::*;
#(
  parameter logic [9:0] X1_INIT = 10'd110,
  parameter logic [9:0] Y1_INIT = 10'd24,
  parameter logic [9:0] X2_INIT = 10'd541,
  parameter logic [9:0] Y2_INIT = 10'd455
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        btnc_rise, btnl_rise, btnr_rise, btnu_rise, btnd_rise,
  input  logic        btnl_cln, btnr_cln, btnu_cln, btnd_cln,
  input  logic        btnc_held,
  input  logic        edit_sw,
  input  logic        tick,
  input  logic        parser_done,
  input  logic        rec_done,
  input  board_t      recg_board,
  input  logic        solver_done,
  input  logic        solver_invalid,
  output sys_state_t  state,
  output logic [9:0]  x1, y1, x2, y2,
  output logic [3:0]  selected_x, selected_y,
  output board_t      board,
  output digit_t      tutorial_guess,
  output logic        parser_start,
  output logic        rec_start,
  output logic        solver_load
);

  logic entered;  // first clock in the current state
  logic armed;    // the solver has been loaded and its flags are current

  function automatic digit_t inc_digit(input digit_t d);
    return (d >= 4'd9) ? 4'd0 : d + 4'd1;
  endfunction

  function automatic digit_t dec_digit(input digit_t d);
    return (d == 4'd0) ? 4'd9 : d - 4'd1;
  endfunction

  always_ff @(posedge clk) begin
    parser_start <= 1'b0;
    rec_start    <= 1'b0;
    solver_load  <= 1'b0;
    if (rst) begin
      state          <= ST_IDLE;
      entered        <= 1'b1;
      armed          <= 1'b0;
      x1             <= X1_INIT;
      y1             <= Y1_INIT;
      x2             <= X2_INIT;
      y2             <= Y2_INIT;
      selected_x     <= 4'd4;
      selected_y     <= 4'd4;
      board          <= '0;
      tutorial_guess <= 4'd1;
    end else begin
      entered <= 1'b0;
      case (state)
        ST_IDLE: if (btnc_rise) begin state <= ST_CHOOSE_XY1; entered <= 1'b1; end
        ST_CHOOSE_XY1: begin
          if (btnc_rise) begin
            state <= ST_CHOOSE_XY2; entered <= 1'b1;
          end else if (tick) begin
            if (btnl_cln)      x1 <= x1 - 10'd1;
            else if (btnr_cln) x1 <= x1 + 10'd1;
            else if (btnu_cln) y1 <= y1 - 10'd1;
            else if (btnd_cln) y1 <= y1 + 10'd1;
          end
        end
        ST_CHOOSE_XY2: begin
          if (btnc_rise) begin
            state <= ST_RESIZING; entered <= 1'b1;
          end else if (tick) begin
            if (btnl_cln)      x2 <= x2 - 10'd1;
            else if (btnr_cln) x2 <= x2 + 10'd1;
            else if (btnu_cln) y2 <= y2 - 10'd1;
            else if (btnd_cln) y2 <= y2 + 10'd1;
          end
        end
        ST_RESIZING: begin
          if (entered) parser_start <= 1'b1;
          else if (parser_done) begin state <= ST_RECOGNIZING; entered <= 1'b1; end
        end
        ST_RECOGNIZING: begin
          if (entered) rec_start <= 1'b1;
          else if (rec_done) begin
            board <= recg_board;
            state <= ST_FIXING;
            entered <= 1'b1;
          end
        end
        ST_FIXING: begin
          if (edit_sw) begin
            if (btnu_rise)
              board[selected_y][selected_x] <= inc_digit(board[selected_y][selected_x]);
            else if (btnd_rise)
              board[selected_y][selected_x] <= dec_digit(board[selected_y][selected_x]);
          end else begin
            if (btnl_rise && selected_x > 4'd0)      selected_x <= selected_x - 4'd1;
            else if (btnr_rise && selected_x < 4'd8) selected_x <= selected_x + 4'd1;
            else if (btnu_rise && selected_y > 4'd0) selected_y <= selected_y - 4'd1;
            else if (btnd_rise && selected_y < 4'd8) selected_y <= selected_y + 4'd1;
            else if (btnc_held) begin state <= ST_SOLVING; entered <= 1'b1; end
          end
        end
        ST_SOLVING: begin
          if (entered) begin
            solver_load <= 1'b1;
            armed       <= 1'b0;
          end else if (!armed) armed <= 1'b1;  // the load takes effect now
          else if (solver_done) begin state <= ST_OUTPUT; entered <= 1'b1; end
          else if (solver_invalid) begin state <= ST_FIXING; entered <= 1'b1; end
        end
        ST_OUTPUT: if (edit_sw) begin state <= ST_TUTORIAL; entered <= 1'b1; end
        ST_TUTORIAL: begin
          if (edit_sw) begin
            if (btnu_rise)      tutorial_guess <= (tutorial_guess >= 4'd9) ? 4'd1 : tutorial_guess + 4'd1;
            else if (btnd_rise) tutorial_guess <= (tutorial_guess <= 4'd1) ? 4'd9 : tutorial_guess - 4'd1;
            else if (btnc_rise) board[selected_y][selected_x] <= tutorial_guess;
            else if (btnl_rise) board[selected_y][selected_x] <= 4'd0;
          end else begin
            if (btnl_rise && selected_x > 4'd0)      selected_x <= selected_x - 4'd1;
            else if (btnr_rise && selected_x < 4'd8) selected_x <= selected_x + 4'd1;
            else if (btnu_rise && selected_y > 4'd0) selected_y <= selected_y - 4'd1;
            else if (btnd_rise && selected_y < 4'd8) selected_y <= selected_y + 4'd1;
          end
        end
        default: begin state <= ST_IDLE; entered <= 1'b1; end
      endcase
    end
  end

endmodule

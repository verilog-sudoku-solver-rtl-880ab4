// sudoku_top: camera-based Sudoku solver system.
//
// A picture of a printed Sudoku is captured into the camera frame buffer.
// The user frames the puzzle with two crosshairs; the frame parser rescales
// that region to 144x144 pixels in the rescaled buffer; the recognizer
// reads each 16x16 cell and matches it against digit templates; the user
// corrects mistakes on the VGA screen; the solver fills in the board; the
// solution is shown, and in tutorial mode the user's own entries are
// checked against it, the screen border turning red on a wrong digit.
//
// Wiring: five buttons pass a debouncer each (plus a slower one on the
// centre button that detects a long press) and rising-edge detectors into
// the main FSM. The frame buffer's read address comes from the frame parser
// in the RESIZING state and from the video output otherwise. The rescaled
// buffer's single address port is given to the frame parser in RESIZING,
// to the recognizer in RECOGNIZING and to the video output otherwise. The
// display shows the solved board in the OUTPUT state and the working board
// otherwise.
//
// Interface: clk is the video/system clock (25 MHz gives standard 640x480
// VGA); the camera, which runs on its own pixel clock, is outside this
// design and writes the frame buffer through cam_* ports, storing while
// capture_frame is high. sw[15] is reset, sw[14] the edit switch and
// sw[1] shows the rescaled image; the other switches are unused, which is
// why the lint tool reports sw[13:2] and sw[0] as unread. Status outputs
// for the LEDs, the state, the solver's event flags and the VGA counters
// are brought out.
// Parameters: debounce delays, the crosshair speed and the solver stack
// depth, at the values of the original design by default.
module sudoku_top
  import sudoku_pkg::*;
#(
  parameter int unsigned DEBOUNCE_DELAY = 250000,
  parameter int unsigned HELD_DELAY     = 1000000,
  parameter int unsigned PRESCALE       = 120001,
  parameter int unsigned MAX_GUESSES    = 16
) (
  input  logic           clk,
  input  logic [15:0]    sw,
  input  logic           btnc, btnl, btnr, btnu, btnd,
  input  logic           cam_clk,
  input  logic           cam_we,
  input  logic [18:0]    cam_addr,
  input  logic [11:0]    cam_data,
  output logic           capture_frame,
  output logic [3:0]     vga_r, vga_g, vga_b,
  output logic           vga_hs, vga_vs,
  output logic [9:0]     hcount, vcount,
  output logic [15:0]    led,
  output sys_state_t     state,
  output board_t         solved_board,
  output logic           solver_done,
  output logic           solver_invalid,
  output solver_events_t solver_events
);

  logic reset;
  pwr_reset u_por (.clk(clk), .reset_input(sw[15]), .reset(reset));

  // buttons
  logic btnc_cln, btnl_cln, btnr_cln, btnu_cln, btnd_cln, btnc_held;
  logic btnc_rise, btnl_rise, btnr_rise, btnu_rise, btnd_rise;

  debounce #(.DELAY(DEBOUNCE_DELAY)) u_deb_c (.clk(clk), .reset(reset), .noisy(btnc), .clean(btnc_cln));
  debounce #(.DELAY(DEBOUNCE_DELAY)) u_deb_l (.clk(clk), .reset(reset), .noisy(btnl), .clean(btnl_cln));
  debounce #(.DELAY(DEBOUNCE_DELAY)) u_deb_r (.clk(clk), .reset(reset), .noisy(btnr), .clean(btnr_cln));
  debounce #(.DELAY(DEBOUNCE_DELAY)) u_deb_u (.clk(clk), .reset(reset), .noisy(btnu), .clean(btnu_cln));
  debounce #(.DELAY(DEBOUNCE_DELAY)) u_deb_d (.clk(clk), .reset(reset), .noisy(btnd), .clean(btnd_cln));
  debounce #(.DELAY(HELD_DELAY))     u_deb_h (.clk(clk), .reset(reset), .noisy(btnc), .clean(btnc_held));

  rise u_rise_c (.clk(clk), .rst(reset), .in(btnc_cln), .out(btnc_rise));
  rise u_rise_l (.clk(clk), .rst(reset), .in(btnl_cln), .out(btnl_rise));
  rise u_rise_r (.clk(clk), .rst(reset), .in(btnr_cln), .out(btnr_rise));
  rise u_rise_u (.clk(clk), .rst(reset), .in(btnu_cln), .out(btnu_rise));
  rise u_rise_d (.clk(clk), .rst(reset), .in(btnd_cln), .out(btnd_rise));

  logic tick;
  clk_prescale #(.PERIOD(PRESCALE)) u_ps (.clk(clk), .rst(reset), .tick(tick));

  // main FSM
  logic [9:0] x1, y1, x2, y2;
  logic [3:0] selected_x, selected_y;
  board_t     board, recg_board;
  digit_t     tutorial_guess;
  logic       parser_start, parser_done, parser_busy;
  logic       rec_start, rec_done, rec_busy;
  logic       solver_load;

  main_fsm u_fsm (
    .clk(clk), .rst(reset),
    .btnc_rise(btnc_rise), .btnl_rise(btnl_rise), .btnr_rise(btnr_rise),
    .btnu_rise(btnu_rise), .btnd_rise(btnd_rise),
    .btnl_cln(btnl_cln), .btnr_cln(btnr_cln), .btnu_cln(btnu_cln), .btnd_cln(btnd_cln),
    .btnc_held(btnc_held), .edit_sw(sw[14]), .tick(tick),
    .parser_done(parser_done), .rec_done(rec_done), .recg_board(recg_board),
    .solver_done(solver_done), .solver_invalid(solver_invalid),
    .state(state), .x1(x1), .y1(y1), .x2(x2), .y2(y2),
    .selected_x(selected_x), .selected_y(selected_y), .board(board),
    .tutorial_guess(tutorial_guess),
    .parser_start(parser_start), .rec_start(rec_start), .solver_load(solver_load)
  );

  // solver
  sudoku_solver #(.MAX_GUESSES(MAX_GUESSES)) u_solver (
    .clk(clk), .rst(reset), .load(solver_load), .board_in(board),
    .board_out(solved_board), .done(solver_done), .invalid(solver_invalid),
    .events(solver_events)
  );

  // camera frame buffer
  logic [18:0] fb_raddr, vid_fb_addr, parser_fb_addr;
  logic [11:0] fb_rdata;

  assign capture_frame = (state == ST_IDLE);
  assign fb_raddr      = (state == ST_RESIZING) ? parser_fb_addr : vid_fb_addr;

  frame_buffer u_fb (
    .wclk(cam_clk), .we(cam_we && capture_frame), .waddr(cam_addr), .wdata(cam_data),
    .rclk(clk), .raddr(fb_raddr), .rdata(fb_rdata)
  );

  // frame parser and rescaled buffer
  logic        rfb_we;
  logic [14:0] rfb_addr, parser_waddr, rec_addr, vid_rfb_addr;
  logic [11:0] rfb_wdata, rfb_rdata;

  frame_parser u_parser (
    .clk(clk), .rst(reset), .start(parser_start),
    .x1(x1), .y1(y1), .x2(x2), .y2(y2),
    .img_read_addr(parser_fb_addr), .img_read_data(fb_rdata),
    .we_out(rfb_we), .img_write_addr(parser_waddr), .img_write_data(rfb_wdata),
    .busy(parser_busy), .done(parser_done)
  );

  always_comb begin
    case (state)
      ST_RESIZING:    rfb_addr = parser_waddr;
      ST_RECOGNIZING: rfb_addr = rec_addr;
      default:        rfb_addr = vid_rfb_addr;
    endcase
  end

  rescaled_frame_buffer u_rfb (
    .clk(clk), .we(rfb_we && state == ST_RESIZING), .addr(rfb_addr),
    .wdata(rfb_wdata), .rdata(rfb_rdata)
  );

  char_rec u_rec (
    .clk(clk), .rst(reset), .start(rec_start),
    .img_addr(rec_addr), .img_data(rfb_rdata),
    .recg_board(recg_board), .busy(rec_busy), .done(rec_done)
  );

  // tutorial checker and video
  logic [80:0] wrong_cells;
  logic        wrong_guess;
  logic        vblank;
  logic [11:0] rgb;

  wrong_guess_gen u_wrong (
    .input_board(board), .solved_board(solved_board), .state(state),
    .wrong_cells(wrong_cells), .wrong_guess(wrong_guess)
  );

  video_playback u_video (
    .clk(clk), .rst(reset),
    .fb_addr(vid_fb_addr), .fb_data(fb_rdata),
    .rfb_addr(vid_rfb_addr), .rfb_data(rfb_rdata),
    .x1(x1), .y1(y1), .x2(x2), .y2(y2),
    .state(state), .switch_vid(sw[1]),
    .board((state == ST_OUTPUT) ? solved_board : board),
    .selected_x(selected_x), .selected_y(selected_y),
    .wrong_cells(wrong_cells), .wrong_guess(wrong_guess),
    .hcount(hcount), .vcount(vcount),
    .hsync(vga_hs), .vsync(vga_vs), .blank(vblank), .rgb(rgb)
  );

  assign {vga_r, vga_g, vga_b} = rgb;

  assign led = {tutorial_guess, state, wrong_guess, vblank, rec_busy, parser_busy,
                solver_invalid, solver_done, (state == ST_RESIZING), sw[1]};

endmodule

// tb_sudoku_top_full: the end-to-end sequence of tb_sudoku_top_body.svh with
// sudoku_top at its default parameters: 250,000-clock debounce, 1,000,000-
// clock long press, one crosshair step per 120,001 clocks, 16-entry guess
// stack and full-size frame buffers.
module tb_sudoku_top_full;
  localparam int DEB = 250000, HELD = 1000000, PS = 120001;
`include "tb_sudoku_top_body.svh"
  sudoku_top dut (.*);
endmodule

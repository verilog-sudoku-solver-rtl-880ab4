// tb_sudoku_top: end-to-end test of the whole system with short timing
// parameters (debounce 4 clocks, long press 40 clocks, one crosshair step
// per 50 clocks) so that the complete user sequence runs quickly. The
// sequence and its checks are in tb_sudoku_top_body.svh.
module tb_sudoku_top;
  localparam int DEB = 4, HELD = 40, PS = 50;
`include "tb_sudoku_top_body.svh"
  sudoku_top #(.DEBOUNCE_DELAY(DEB), .HELD_DELAY(HELD), .PRESCALE(PS)) dut (.*);
endmodule

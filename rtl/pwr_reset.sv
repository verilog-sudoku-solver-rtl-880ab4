// pwr_reset: power-on reset.
//
// A shift register is filled with ones by its initial value and shifts in
// zeros; reset stays high until the HOLD-th clock after configuration, and
// again whenever reset_input (a switch) is high. Interface: clk, reset_input,
// reset. Timing: reset is high for the first HOLD clocks. The original used
// a 24-bit register preset to 16'hFFFF and tested bit 15, a hold of 16
// clocks; HOLD defaults to that. The initial value relies on FPGA
// configuration, as in the original; the lint note about a procedural
// assignment to a variable with an initial value is therefore intended.
module pwr_reset #(
  parameter int unsigned HOLD = 16
) (
  input  logic clk,
  input  logic reset_input,
  output logic reset
);

  logic [HOLD-1:0] sr = '1;

  always_ff @(posedge clk) sr <= {sr[HOLD-2:0], 1'b0};

  assign reset = reset_input || sr[HOLD-1];

endmodule

// clk_prescale: periodic enable pulse.
//
// A counter runs from 0 to PERIOD-1 and wraps; tick is high for the one
// clock in which the counter holds its last value. The system uses it to
// move the crosshairs by one pixel at a speed a person can follow while a
// direction button is held. Interface: clk, rst, tick. Timing: one pulse
// every PERIOD clocks. The default period of 120,001 clocks (a counter that
// wraps after 120000) follows the original; the reset is this design's.
module clk_prescale #(
  parameter int unsigned PERIOD = 120001
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int unsigned CW = $clog2(PERIOD);

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst || count == CW'(PERIOD - 1)) count <= '0;
    else                                  count <= count + CW'(1);
  end

  assign tick = (count == CW'(PERIOD - 1));

endmodule

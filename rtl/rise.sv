// rise: rising-edge detector for debounced buttons.
//
// Registers the input and outputs a one-clock pulse when the input is high
// and was low on the previous clock. Interface: clk, rst (clears the stored
// level), in, out. Timing: out is combinational from in, so the pulse comes
// in the same cycle as the rising input. As in the original design; the
// reset is added here.
module rise (
  input  logic clk,
  input  logic rst,
  input  logic in,
  output logic out
);

  logic last;

  always_ff @(posedge clk) begin
    if (rst) last <= 1'b0;
    else     last <= in;
  end

  assign out = in && !last;

endmodule

// debounce: push-button and switch debouncer.
//
// The raw input is sampled every clock. Each time it differs from the last
// sampled level the counter restarts; once the level has stayed the same for
// DELAY clocks it is copied to clean. Reset copies the raw input straight
// to clean. With the default DELAY of 250,000 the filter waits 10 ms at a
// 25 MHz clock. Interface: clk, synchronous reset, noisy in, clean out.
// Timing: clean follows a stable change DELAY+2 clocks later. The behaviour
// and the default delay follow the original debouncer; the counter width is
// derived from DELAY here.
module debounce #(
  parameter int unsigned DELAY = 250000
) (
  input  logic clk,
  input  logic reset,
  input  logic noisy,
  output logic clean
);

  localparam int unsigned CW = $clog2(DELAY + 1);

  logic [CW-1:0] count;
  logic          last;

  always_ff @(posedge clk) begin
    if (reset) begin
      count <= '0;
      last  <= noisy;
      clean <= noisy;
    end else if (noisy != last) begin
      last  <= noisy;
      count <= '0;
    end else if (count == CW'(DELAY)) begin
      clean <= last;
    end else begin
      count <= count + CW'(1);
    end
  end

endmodule

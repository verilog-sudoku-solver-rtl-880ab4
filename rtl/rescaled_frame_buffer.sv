// rescaled_frame_buffer: 144x144 store for the rescaled puzzle image.
//
// Single-port block RAM of DEPTH 12-bit words with a 15-bit address,
// y*144+x. The frame parser writes it; character recognition and the
// video output read it through the same address port, which the system
// multiplexes. A write stores wdata at addr on the clock edge; a read
// returns the word one clock after the address (registered output,
// read-before-write). Size and widths follow the original; the one-cycle
// read delay is this design's choice, matching the delay compensation of
// the character recognizer.
module rescaled_frame_buffer #(
  parameter int unsigned DEPTH = 144 * 144,
  parameter int unsigned AW    = 15,
  parameter int unsigned DW    = 12
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (addr < AW'(DEPTH)) begin
      rdata <= mem[addr];
      if (we) mem[addr] <= wdata;
    end else begin
      rdata <= '0;
    end
  end

endmodule

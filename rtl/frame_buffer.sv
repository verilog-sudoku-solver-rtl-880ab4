// frame_buffer: high-resolution camera frame store.
//
// Simple dual-port block RAM of DEPTH words of 12-bit RGB (4 bits per
// colour), addressed by a 19-bit pixel index y*640+x. The camera writes it
// on its own pixel clock; the video output or the frame parser reads it on
// the system clock. Reads pass an address register and an output register,
// so data appears READ_LATENCY = 2 clocks after the address, the delay the
// rest of the system is built around. Interface: write port (wclk, we,
// waddr, wdata), read port (rclk, raddr, rdata). Word width, address width
// and the two-cycle read delay follow the original; the depth of one
// 640x480 frame is this design's reading of the 19-bit address.
module frame_buffer #(
  parameter int unsigned DEPTH = 640 * 480,
  parameter int unsigned AW    = 19,
  parameter int unsigned DW    = 12
) (
  input  logic          wclk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          rclk,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] raddr_q;

  always_ff @(posedge wclk) begin
    if (we && waddr < AW'(DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    raddr_q <= raddr;
    rdata   <= (raddr_q < AW'(DEPTH)) ? mem[raddr_q] : '0;
  end

endmodule

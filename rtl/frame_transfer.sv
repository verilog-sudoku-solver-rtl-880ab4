// frame_transfer: read-to-write alignment between two block RAMs.
//
// The frame parser issues one read of the high-resolution frame buffer per
// clock, together with the address in the rescaled buffer where that pixel
// belongs. The frame buffer answers READ_LATENCY clocks later, so this block
// delays the write address, the write enable and the end-of-frame marker by
// the same number of clocks through a small shift register; the read data
// goes straight through as the write data. Interface: valid_in, waddr_in
// and last_in from the address generator, read_data from the frame buffer;
// we_out, write_addr_out, write_data_out to the rescaled buffer, and a done
// pulse when the last pixel has been written. Timing: fixed latency of
// READ_LATENCY clocks, no stalls. The two-clock read delay follows the
// original; the shift-register form is this design's.
module frame_transfer #(
  parameter int unsigned READ_LATENCY = 2,
  parameter int unsigned WAW          = 15,
  parameter int unsigned DW           = 12
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           valid_in,
  input  logic           last_in,
  input  logic [WAW-1:0] waddr_in,
  input  logic [DW-1:0]  read_data,
  output logic           we_out,
  output logic [WAW-1:0] write_addr_out,
  output logic [DW-1:0]  write_data_out,
  output logic           done
);

  typedef struct packed {
    logic           valid;
    logic           last;
    logic [WAW-1:0] addr;
  } stage_t;

  stage_t pipe [READ_LATENCY];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < READ_LATENCY; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= '{valid: valid_in, last: valid_in && last_in, addr: waddr_in};
      for (int i = 1; i < READ_LATENCY; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign we_out         = pipe[READ_LATENCY-1].valid;
  assign write_addr_out = pipe[READ_LATENCY-1].addr;
  assign write_data_out = read_data;
  assign done           = pipe[READ_LATENCY-1].last;

endmodule

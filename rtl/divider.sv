// divider: sequential restoring divider.
//
// A start pulse latches dividend and divisor; the divider then produces one
// quotient bit per clock, most significant first, by trial subtraction of
// the shifted divisor from the partial remainder. With sign high both
// operands are taken as two's complement: the magnitudes are divided and the
// quotient is negated when the operand signs differ, the remainder takes the
// sign of the dividend. Interface: clk, rst, start, sign, dividend, divisor;
// quotient, remainder and ready, which is high whenever no division is in
// progress (and so from WIDTH+1 clocks after start until the next start).
// A divisor of zero gives an all-ones quotient magnitude. The restoring
// algorithm, the start/ready handshake and the sign input follow the
// original divider; the remainder sign rule is this design's choice.
module divider #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic             sign,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder,
  output logic             ready
);

  localparam int unsigned BW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] rem_mag, q_mag, dvd, dvs;
  logic [BW-1:0]    bits_left;
  logic             neg_q, neg_r;
  logic [WIDTH:0]   trial;
  logic [WIDTH-1:0] shifted;

  always_comb begin
    shifted = {rem_mag[WIDTH-2:0], dvd[WIDTH-1]};
    trial   = {rem_mag[WIDTH-1], shifted} - {1'b0, dvs};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bits_left <= '0;
      rem_mag   <= '0;
      q_mag     <= '0;
      dvd       <= '0;
      dvs       <= '0;
      neg_q     <= 1'b0;
      neg_r     <= 1'b0;
    end else if (start) begin
      dvd       <= (sign && dividend[WIDTH-1]) ? -dividend : dividend;
      dvs       <= (sign && divisor[WIDTH-1]) ? -divisor : divisor;
      neg_q     <= sign && (dividend[WIDTH-1] ^ divisor[WIDTH-1]);
      neg_r     <= sign && dividend[WIDTH-1];
      rem_mag   <= '0;
      q_mag     <= '0;
      bits_left <= BW'(WIDTH);
    end else if (bits_left != '0) begin
      dvd <= dvd << 1;
      if (!trial[WIDTH]) begin
        rem_mag <= trial[WIDTH-1:0];
        q_mag   <= {q_mag[WIDTH-2:0], 1'b1};
      end else begin
        rem_mag <= shifted;
        q_mag   <= {q_mag[WIDTH-2:0], 1'b0};
      end
      bits_left <= bits_left - BW'(1);
    end
  end

  assign ready     = (bits_left == '0) && !start;
  assign quotient  = neg_q ? -q_mag : q_mag;
  assign remainder = neg_r ? -rem_mag : rem_mag;

endmodule

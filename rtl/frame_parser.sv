// frame_parser: rescales the selected puzzle region to TARGET x TARGET.
//
// The user marks the puzzle with two corners, (x1,y1) top-left and (x2,y2)
// bottom-right, in the 640-pixel-wide camera frame. The parser first divides
// the width x2-x1 and the height y2-y1 by TARGET with two sequential
// dividers, keeping quotient and remainder. It then walks the TARGET x
// TARGET output grid row by row. Along a row the source x advances by the
// quotient each step while the remainder is added to an accumulator; when
// the accumulator reaches TARGET it is reduced by TARGET and x takes one
// extra pixel, so the rounding drift of the plain quotient never builds up
// (a Bresenham-style fractional step). The source y advances the same way
// from row to row. Every step issues a read of the frame buffer at
// y*640+x; frame_transfer delays the matching write address and enable by
// the buffer's read latency so each pixel lands at j*TARGET+i of the
// rescaled buffer. With TARGET = 144 each Sudoku cell becomes 16x16 pixels.
//
// Interface: start pulse with the corners held stable; img_read_addr to the
// frame buffer and img_read_data back; we_out, img_write_addr and
// img_write_data to the rescaled buffer; busy while working; done pulses
// once the last pixel is written. Timing: about 2*(WIDTH+1) clocks of
// division, then one pixel per clock (TARGET*TARGET clocks) plus the read
// latency. Follows the described quotient/remainder scheme, the 144-pixel
// target and the two-cycle read delay; the state encoding, the reaching
// (not exceeding) test of the accumulator and the order of the two
// divisions are this design's choices.
module frame_parser #(
  parameter int unsigned TARGET       = 144,
  parameter int unsigned FRAME_WIDTH  = 640,
  parameter int unsigned READ_LATENCY = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [9:0]  x1,
  input  logic [9:0]  y1,
  input  logic [9:0]  x2,
  input  logic [9:0]  y2,
  output logic [18:0] img_read_addr,
  input  logic [11:0] img_read_data,
  output logic        we_out,
  output logic [14:0] img_write_addr,
  output logic [11:0] img_write_data,
  output logic        busy,
  output logic        done
);

  typedef enum logic [2:0] {P_IDLE, P_DIV_X, P_DIV_Y, P_SCAN, P_DRAIN} pstate_t;

  pstate_t     state;
  logic        div_start, div_ready;
  logic [9:0]  div_dividend, div_q, div_r;
  logic [9:0]  qx, rx, qy, ry;
  logic [9:0]  sx, sy;          // source pixel
  logic [9:0]  ax, ay;          // fractional accumulators
  logic [7:0]  i, j;            // output pixel
  logic        issue, last;
  logic        xfer_done;

  divider #(.WIDTH(10)) u_div (
    .clk(clk), .rst(rst), .start(div_start), .sign(1'b0),
    .dividend(div_dividend), .divisor(10'(TARGET)),
    .quotient(div_q), .remainder(div_r), .ready(div_ready)
  );

  logic div_wait;  // a division has been started and has not been collected

  always_comb begin
    div_dividend = (state == P_DIV_Y) ? (y2 - y1) : (x2 - x1);
    issue        = (state == P_SCAN);
    last         = (i == 8'(TARGET - 1)) && (j == 8'(TARGET - 1));
    img_read_addr = 19'(sy) * 19'(FRAME_WIDTH) + 19'(sx);
    busy         = (state != P_IDLE);
  end

  always_ff @(posedge clk) begin
    div_start <= 1'b0;
    if (rst) begin
      state    <= P_IDLE;
      div_wait <= 1'b0;
      {qx, rx, qy, ry, sx, sy, ax, ay} <= '0;
      i <= '0;
      j <= '0;
    end else begin
      case (state)
        P_IDLE: if (start) begin
          state     <= P_DIV_X;
          div_start <= 1'b1;
          div_wait  <= 1'b1;
        end
        P_DIV_X: if (div_wait && div_ready && !div_start) begin
          qx        <= div_q;
          rx        <= div_r;
          state     <= P_DIV_Y;
          div_start <= 1'b1;
        end
        P_DIV_Y: if (div_ready && !div_start) begin
          qy       <= div_q;
          ry       <= div_r;
          div_wait <= 1'b0;
          state    <= P_SCAN;
          sx <= x1; sy <= y1; ax <= '0; ay <= '0;
          i  <= '0; j  <= '0;
        end
        P_SCAN: begin
          if (i == 8'(TARGET - 1)) begin
            i  <= '0;
            sx <= x1;
            ax <= '0;
            j  <= j + 8'd1;
            if (ay + ry >= 10'(TARGET)) begin
              ay <= ay + ry - 10'(TARGET);
              sy <= sy + qy + 10'd1;
            end else begin
              ay <= ay + ry;
              sy <= sy + qy;
            end
            if (last) state <= P_DRAIN;
          end else begin
            i <= i + 8'd1;
            if (ax + rx >= 10'(TARGET)) begin
              ax <= ax + rx - 10'(TARGET);
              sx <= sx + qx + 10'd1;
            end else begin
              ax <= ax + rx;
              sx <= sx + qx;
            end
          end
        end
        P_DRAIN: if (xfer_done) state <= P_IDLE;
        default: state <= P_IDLE;
      endcase
    end
  end

  frame_transfer #(.READ_LATENCY(READ_LATENCY), .WAW(15), .DW(12)) u_xfer (
    .clk(clk), .rst(rst),
    .valid_in(issue), .last_in(last),
    .waddr_in(15'(j) * 15'(TARGET) + 15'(i)),
    .read_data(img_read_data),
    .we_out(we_out), .write_addr_out(img_write_addr), .write_data_out(img_write_data),
    .done(xfer_done)
  );

  assign done = xfer_done;

endmodule

// tb_frame_parser: rescales a synthetic camera frame and checks every pixel
// of the 144x144 result.
//
// The frame model answers a read two clocks after the address with a value
// computed from the address. Each output pixel (i,j) must hold the source
// pixel (x1 + floor(i*(x2-x1)/144), y1 + floor(j*(y2-y1)/144)), which is
// what an exact quotient/remainder step gives. Four corner pairs are run:
// the default crosshairs, an exact 3x region and a region narrower than 144
// pixels (quotient 0), and a 360-pixel square whose remainder 72 makes
// the accumulators reach exactly 144. The run must take 144*144 clocks plus a small fixed
// overhead for the two divisions and the read latency.
module tb_frame_parser;
  logic clk = 1'b0, rst, start, we_out, busy, done;
  logic [9:0] x1, y1, x2, y2;
  logic [18:0] img_read_addr;
  logic [11:0] img_read_data;
  logic [14:0] img_write_addr;
  logic [11:0] img_write_data;
  logic [11:0] out_img [20736];
  logic [18:0] a_q;
  int checks = 0, failures = 0;

  frame_parser dut (.*);
  always #5 clk = ~clk;

  function automatic logic [11:0] pix(input logic [18:0] a);
    return 12'((a * 37) ^ (a >> 7));
  endfunction

  // two-cycle read model of the frame buffer
  always_ff @(posedge clk) begin
    a_q <= img_read_addr;
    img_read_data <= pix(a_q);
  end

  always_ff @(posedge clk) if (we_out) out_img[img_write_addr] <= img_write_data;

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input int ax1, input int ay1, input int ax2, input int ay2);
    int cyc, bad;
    for (int k = 0; k < 20736; k++) out_img[k] = 12'hABC;
    @(negedge clk);
    x1 = 10'(ax1); y1 = 10'(ay1); x2 = 10'(ax2); y2 = 10'(ay2);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 100000) begin @(negedge clk); cyc++; end
    @(negedge clk);
    bad = 0;
    for (int j = 0; j < 144; j++)
      for (int i = 0; i < 144; i++) begin
        int sx, sy;
        sx = ax1 + (i * (ax2 - ax1)) / 144;
        sy = ay1 + (j * (ay2 - ay1)) / 144;
        checks++;
        if (out_img[j * 144 + i] !== pix(19'(sy * 640 + sx))) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL (%0d,%0d) got %h expected %h from (%0d,%0d)",
                                i, j, out_img[j * 144 + i], pix(19'(sy * 640 + sx)), sx, sy);
        end
      end
    checks++;
    if (cyc < 20736 || cyc > 20736 + 40) begin failures++; $display("FAIL took %0d clocks", cyc); end
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
    $display("corners (%0d,%0d)-(%0d,%0d): %0d clocks, %0d bad pixels", ax1, ay1, ax2, ay2, cyc, bad);
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; x1 = '0; y1 = '0; x2 = '0; y2 = '0; a_q = '0;
    @(negedge clk); @(negedge clk); rst = 1'b0;
    run(110, 24, 541, 455);
    run(104, 24, 536, 456);
    run(300, 200, 400, 333);
    run(100, 50, 460, 410);   // remainder 72: the accumulators reach exactly 144
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

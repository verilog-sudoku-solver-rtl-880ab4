// tb_divider: random unsigned and signed divisions against the simulator's
// own / and % operators, with the WIDTH+1-clock latency checked.
module tb_divider;
  localparam int W = 10;
  logic clk = 1'b0, rst, start, sign, ready;
  logic [W-1:0] dividend, divisor, quotient, remainder;
  int checks = 0, failures = 0;

  divider #(.WIDTH(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input logic s, input logic [W-1:0] a, input logic [W-1:0] b);
    int lat, eq, er;
    @(negedge clk);
    sign = s; dividend = a; divisor = b; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!ready && lat < 100) begin @(negedge clk); lat++; end
    if (s) begin
      eq = $signed(a) / $signed(b);
      er = $signed(a) % $signed(b);
    end else begin
      eq = int'(a) / int'(b);
      er = int'(a) % int'(b);
    end
    checks++;
    if (quotient !== W'(eq) || remainder !== W'(er)) begin
      failures++;
      $display("FAIL sign=%0b %0d / %0d -> q=%0d r=%0d", s, a, b, quotient, remainder);
    end
    checks++;
    if (lat != W + 1) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; sign = 1'b0; dividend = '0; divisor = '1;
    @(negedge clk); rst = 1'b0;
    run(1'b0, 10'd431, 10'd144);
    run(1'b0, 10'd432, 10'd144);
    run(1'b0, 10'd1023, 10'd1);
    run(1'b0, 10'd5, 10'd1023);
    for (int i = 0; i < 200; i++) begin
      logic [W-1:0] a, b;
      a = W'($urandom);
      b = W'($urandom_range(1, 1023));
      run(1'b0, a, b);
    end
    for (int i = 0; i < 200; i++) begin
      logic [W-1:0] a, b;
      a = W'($urandom);
      b = W'($urandom);
      if (b == '0) b = 10'd3;
      if (a == 10'h200) a = 10'h201;  // -512 has no positive magnitude
      run(1'b1, a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_clk_prescale: checks the tick period, once with a short period and once
// with the default period of 120,001 clocks.
module tb_clk_prescale;
  logic clk = 1'b0, rst, tick, tick_def;
  int checks = 0, failures = 0;

  clk_prescale #(.PERIOD(7)) dut (.clk(clk), .rst(rst), .tick(tick));
  clk_prescale dut_def (.clk(clk), .rst(rst), .tick(tick_def));
  always #5 clk = ~clk;

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int last, n, last_def, n_def;
    rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    last = -1; n = 0; last_def = -1; n_def = 0;
    for (int i = 0; i < 250_000; i++) begin
      @(posedge clk);
      if (tick) begin
        if (last >= 0) begin
          checks++;
          if (i - last != 7) begin failures++; $display("FAIL period %0d", i - last); end
        end
        last = i; n++;
      end
      if (tick_def) begin
        if (last_def >= 0) begin
          checks++;
          if (i - last_def != 120001) begin failures++; $display("FAIL default period %0d", i - last_def); end
        end
        last_def = i; n_def++;
      end
    end
    checks++;
    if (n < 10 || n_def != 2) begin failures++; $display("FAIL tick counts %0d %0d", n, n_def); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

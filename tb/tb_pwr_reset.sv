// tb_pwr_reset: reset must be high for the first HOLD clocks after start-up,
// then low, and high again whenever the reset switch is on.
module tb_pwr_reset;
  logic clk = 1'b0, reset_input, reset;
  int checks = 0, failures = 0;

  pwr_reset #(.HOLD(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    reset_input = 1'b0;
    for (int i = 0; i < 24; i++) begin
      #1;
      checks++;
      if (reset !== (i < 16)) begin failures++; $display("FAIL clock %0d reset=%b", i, reset); end
      @(posedge clk);
    end
    reset_input = 1'b1; #1;
    checks++; if (reset !== 1'b1) begin failures++; $display("FAIL switch"); end
    reset_input = 1'b0; #1;
    checks++; if (reset !== 1'b0) begin failures++; $display("FAIL switch off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

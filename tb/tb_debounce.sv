// tb_debounce: checks that the debouncer ignores bounces shorter than DELAY
// and follows a level that stays stable, with the exact delay.
module tb_debounce;
  localparam int DELAY = 20;
  logic clk = 1'b0, reset, noisy, clean;
  int checks = 0, failures = 0;

  debounce #(.DELAY(DELAY)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_clean(input logic v, input string what);
    checks++;
    if (clean !== v) begin failures++; $display("FAIL %s: clean=%b", what, clean); end
  endtask

  initial begin
    noisy = 1'b0; reset = 1'b1;
    @(negedge clk); @(negedge clk); reset = 1'b0;
    expect_clean(1'b0, "after reset");
    // bounces: toggles every 5 clocks never get through
    for (int i = 0; i < 10; i++) begin
      noisy = ~noisy;
      repeat (5) @(negedge clk);
      expect_clean(1'b0, "bouncing");
    end
    noisy = 1'b1;
    // stable high: clean rises DELAY+2 clocks after the edge
    for (int t = 1; t <= DELAY + 4; t++) begin
      @(negedge clk);
      expect_clean((t >= DELAY + 2) ? 1'b1 : 1'b0, $sformatf("rising, clock %0d", t));
    end
    noisy = 1'b0;
    repeat (3) @(negedge clk);
    noisy = 1'b1;   // short glitch low
    repeat (DELAY + 5) @(negedge clk);
    expect_clean(1'b1, "glitch low ignored");
    noisy = 1'b0;
    repeat (DELAY + 5) @(negedge clk);
    expect_clean(1'b0, "stable low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

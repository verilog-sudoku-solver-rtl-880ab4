// tb_rise: checks that rise pulses for exactly one clock per rising edge.
module tb_rise;
  logic clk = 1'b0, rst, in, out;
  int checks = 0, failures = 0;
  logic prev;

  rise dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int pulses;
    rst = 1'b1; in = 1'b0;
    @(negedge clk); rst = 1'b0;
    prev = 1'b0;
    pulses = 0;
    for (int i = 0; i < 400; i++) begin
      in = ($urandom_range(0, 3) == 0) ? ~in : in;
      #1;
      checks++;
      if (out !== (in && !prev)) begin failures++; $display("FAIL cycle %0d", i); end
      if (out) pulses++;
      @(negedge clk);
      prev = in;
    end
    checks++;
    if (pulses == 0) begin failures++; $display("FAIL no pulse"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

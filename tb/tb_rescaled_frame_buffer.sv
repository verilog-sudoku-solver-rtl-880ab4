// tb_rescaled_frame_buffer: random writes and reads on the single port,
// checked against a reference array, with the one-cycle read latency and
// read-before-write behaviour checked.
module tb_rescaled_frame_buffer;
  logic clk = 1'b0, we;
  logic [14:0] addr;
  logic [11:0] wdata, rdata;
  logic [11:0] model [20736];
  int checks = 0, failures = 0;

  rescaled_frame_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 1'b0; addr = '0; wdata = '0;
    // fill the whole memory
    for (int i = 0; i < 20736; i++) begin
      @(negedge clk);
      we = 1'b1; addr = 15'(i); wdata = 12'($urandom); model[i] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      int a;
      logic [11:0] old;
      @(negedge clk);
      a = $urandom_range(0, 20735);
      addr = 15'(a);
      we = ($urandom_range(0, 3) == 0);
      wdata = 12'($urandom);
      old = model[a];
      if (we) model[a] = wdata;
      @(negedge clk);
      we = 1'b0;
      checks++;
      if (rdata !== old) begin failures++; $display("FAIL read %0d got %h expected %h", a, rdata, old); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

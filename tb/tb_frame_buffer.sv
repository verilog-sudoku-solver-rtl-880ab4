// tb_frame_buffer: writes random pixels at random addresses on one clock and
// reads them back on a second, unrelated clock, checking data and the
// two-cycle read latency against a reference array.
module tb_frame_buffer;
  logic wclk = 1'b0, rclk = 1'b0, we;
  logic [18:0] waddr, raddr;
  logic [11:0] wdata, rdata;
  logic [11:0] model [int];
  int checks = 0, failures = 0;

  frame_buffer dut (.*);
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int addrs[200];
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int i = 0; i < 200; i++) begin
      @(negedge wclk);
      addrs[i] = (i < 2) ? ((i == 0) ? 0 : 307199) : $urandom_range(0, 307199);
      waddr = 19'(addrs[i]); wdata = 12'($urandom); we = 1'b1;
      model[addrs[i]] = wdata;
    end
    @(negedge wclk); we = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(negedge rclk);
      raddr = 19'(addrs[i]);
      @(negedge rclk);
      // one clock after the address: still the previous word
      raddr = 19'($urandom_range(0, 307199));  // must not disturb the pending read
      if (i > 0) begin
        checks++;
        if (rdata !== model[addrs[i - 1]]) begin
          failures++; $display("FAIL latency: data changed after one clock at %0d", addrs[i]);
        end
      end
      @(negedge rclk);
      checks++;
      if (rdata !== model[addrs[i]]) begin
        failures++; $display("FAIL addr %0d got %h expected %h", addrs[i], rdata, model[addrs[i]]);
      end
      raddr = 19'(addrs[i]);
      @(negedge rclk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

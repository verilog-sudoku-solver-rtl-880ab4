// tb_frame_transfer: feeds a stream of read requests with a memory model of
// two-cycle latency and checks that each write carries the data read for the
// same request, at its own address, and that done follows the last write.
module tb_frame_transfer;
  logic clk = 1'b0, rst, valid_in, last_in, we_out, done;
  logic [14:0] waddr_in, write_addr_out;
  logic [11:0] read_data, write_data_out;
  logic [11:0] rd_pipe [2];
  logic [11:0] src_data;
  int checks = 0, failures = 0;

  frame_transfer dut (.*);
  always #5 clk = ~clk;

  // model memory: data for request k is k*7 mod 4096, returned two clocks later
  always_ff @(posedge clk) begin
    rd_pipe[0] <= src_data;
    rd_pipe[1] <= rd_pipe[0];
  end
  assign read_data = rd_pipe[1];

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int issued = 0, written = 0, done_seen = 0, last_write_cycle = -1, cycle = 0;
  logic [14:0] exp_addr [$];
  logic [11:0] exp_data [$];

  always @(posedge clk) begin
    cycle++;
    if (we_out && !rst) begin
      checks++;
      if (exp_addr.size() == 0) begin failures++; $display("FAIL unexpected write"); end
      else begin
        logic [14:0] ea; logic [11:0] ed;
        ea = exp_addr.pop_front(); ed = exp_data.pop_front();
        if (write_addr_out !== ea || write_data_out !== ed) begin
          failures++; $display("FAIL write %h:%h expected %h:%h", write_addr_out, write_data_out, ea, ed);
        end
      end
      written++; last_write_cycle = cycle;
    end
    if (done && !rst) begin
      done_seen++;
      checks++;
      if (last_write_cycle != cycle) begin failures++; $display("FAIL done not with the last write"); end
    end
  end

  initial begin
    rst = 1'b1; valid_in = 1'b0; last_in = 1'b0; waddr_in = '0; src_data = '0;
    rd_pipe[0] = '0; rd_pipe[1] = '0;
    @(negedge clk); rst = 1'b0;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      valid_in = ($urandom_range(0, 2) != 0) || k == 299;
      last_in = (k == 299);
      waddr_in = 15'($urandom);
      src_data = valid_in ? 12'(k * 7) : 12'hFFF;
      if (valid_in) begin exp_addr.push_back(waddr_in); exp_data.push_back(src_data); issued++; end
    end
    @(negedge clk); valid_in = 1'b0; last_in = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (written != issued || done_seen != 1) begin
      failures++; $display("FAIL issued %0d written %0d done %0d", issued, written, done_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

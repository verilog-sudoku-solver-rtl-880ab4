// tb_group_fsm: self-checking test of the naked/hidden group scanner.
//
// Builds candidate arrays by hand, lets the scanner visit cell (0,0) for one
// cycle and compares the whole group mask register with the expected masks:
//   1. naked pair {1,2} in cells (0,0),(0,1): the rest of row 0 and the rest
//      of square 0 lose 1 and 2;
//   2. hidden pair: digits 1,2 can only go to (0,0) (mask {1,2}) and (0,1)
//      (mask {1,2,3,4}) in row 0, so (0,1) is cut down to {1,2};
//   3. a cell whose unit shows no group leaves gmr untouched.
// It also checks the clear input, the changed/hit flags and the row-major
// scan order with its wrap after 81 cycles.
module tb_group_fsm;
  import sudoku_pkg::*;

  logic clk = 1'b0;
  logic rst, clear, en;
  mask_t [8:0][8:0] pvr, gmr, exp_gmr;
  logic [3:0] pos_r, pos_c;
  logic changed, naked_hit, hidden_hit;
  int checks = 0, failures = 0;

  group_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_gmr(input string name);
    checks++;
    if (gmr !== exp_gmr) begin
      failures++;
      $display("FAIL %s", name);
      for (int r = 0; r < 9; r++)
        for (int c = 0; c < 9; c++)
          if (gmr[r][c] != exp_gmr[r][c])
            $display("  cell %0d,%0d got %b expected %b", r, c, gmr[r][c], exp_gmr[r][c]);
    end
  endtask

  task automatic restart();
    @(negedge clk);
    rst = 1'b1; en = 1'b0;
    @(negedge clk);
    rst = 1'b0;
  endtask

  task automatic visit_first(input logic exp_changed, input logic exp_naked, input logic exp_hidden,
                             input string name);
    // scanner is at (0,0) after reset
    en = 1'b1;
    #1;
    checks++;
    if (changed !== exp_changed || naked_hit !== exp_naked || hidden_hit !== exp_hidden) begin
      failures++;
      $display("FAIL %s flags: changed=%b naked=%b hidden=%b", name, changed, naked_hit, hidden_hit);
    end
    @(negedge clk);
    en = 1'b0;
  endtask

  initial begin
    rst = 1'b1; clear = 1'b0; en = 1'b0;
    for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) pvr[r][c] = ALL_ONES;

    // 1. naked pair
    restart();
    pvr[0][0] = 9'b000000011;
    pvr[0][1] = 9'b000000011;
    for (int c = 2; c < 9; c++) pvr[0][c] = 9'b000000111;
    for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) exp_gmr[r][c] = ALL_ONES;
    for (int c = 2; c < 9; c++) exp_gmr[0][c] = 9'b111111100;
    for (int r = 1; r < 3; r++) for (int c = 0; c < 3; c++) exp_gmr[r][c] = 9'b111111100;
    visit_first(1'b1, 1'b1, 1'b0, "naked");
    check_gmr("naked pair");

    // clear restores all ones
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) exp_gmr[r][c] = ALL_ONES;
    check_gmr("clear");

    // 2. hidden pair
    restart();
    for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) pvr[r][c] = ALL_ONES;
    pvr[0][0] = 9'b000000011;
    pvr[0][1] = 9'b000001111;
    for (int c = 2; c < 9; c++) pvr[0][c] = 9'b111111100;
    for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) exp_gmr[r][c] = ALL_ONES;
    exp_gmr[0][0] = 9'b000000011;
    exp_gmr[0][1] = 9'b000000011;
    visit_first(1'b1, 1'b0, 1'b1, "hidden");
    check_gmr("hidden pair");

    // 3. no group
    restart();
    for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) pvr[r][c] = ALL_ONES;
    pvr[0][0] = 9'b000010011;
    for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) exp_gmr[r][c] = ALL_ONES;
    visit_first(1'b0, 1'b0, 1'b0, "none");
    check_gmr("no group");

    // scan order: row-major, wrapping after 81 cells
    restart();
    en = 1'b1;
    for (int i = 0; i < 163; i++) begin
      checks++;
      if (pos_r != 4'((i % 81) / 9) || pos_c != 4'(i % 9)) begin
        failures++;
        $display("FAIL scan position %0d: %0d,%0d", i, pos_r, pos_c);
      end
      @(negedge clk);
    end
    en = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

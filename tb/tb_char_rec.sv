// tb_char_rec: recognizes random puzzles drawn into a 144x144 image model.
//
// Each of the 81 cells is empty or holds a digit drawn with the same glyph
// shapes the recognizer uses as templates, in random dark ink on random
// bright paper (so the brightness threshold is exercised with many colour
// values, including R+G+B exactly at the threshold, which counts as dark),
// and two pixels per cell are flipped as noise. The recognized board must equal the board
// drawn. The image model answers one clock after the address. The run must
// end 81*256 plus a few clocks after start.
module tb_char_rec;
  import sudoku_pkg::*;
  logic clk = 1'b0, rst, start, busy, done;
  logic [14:0] img_addr;
  logic [11:0] img_data;
  board_t recg_board, drawn;
  logic [11:0] img [20736];
  int checks = 0, failures = 0;

  char_rec dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) img_data <= img[img_addr];

  initial begin
    #20_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // random colour whose R+G+B is at most 20 (dark) or above 20 (bright)
  function automatic logic [11:0] colour(input bit bright_px);
    int r, g, b;
    do begin
      r = $urandom_range(0, 15); g = $urandom_range(0, 15); b = $urandom_range(0, 15);
    end while (bright_px ? (r + g + b <= 20) : (r + g + b > 20));
    if (!bright_px && $urandom_range(0, 9) == 0) begin r = 10; g = 5; b = 5; end  // exactly 20
    return {4'(r), 4'(g), 4'(b)};
  endfunction

  task automatic draw_and_run(input int empty_pct);
    int cyc;
    for (int cr = 0; cr < 9; cr++)
      for (int cc = 0; cc < 9; cc++) begin
        digit_t d;
        int f1, f2;
        d = ($urandom_range(0, 99) < empty_pct) ? 4'd0 : digit_t'($urandom_range(1, 9));
        drawn[cr][cc] = d;
        f1 = $urandom_range(0, 255); f2 = $urandom_range(0, 255);
        for (int y = 0; y < 16; y++)
          for (int x = 0; x < 16; x++) begin
            bit ink;
            ink = (d != 0) && glyph16(d, 4'(x), 4'(y));
            if (y * 16 + x == f1 || y * 16 + x == f2) ink = !ink;
            img[(cr * 16 + y) * 144 + cc * 16 + x] = colour(!ink);
          end
      end
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done && cyc < 50000) begin @(negedge clk); cyc++; end
    checks++;
    if (recg_board !== drawn) begin
      failures++;
      for (int r = 0; r < 9; r++)
        for (int c = 0; c < 9; c++)
          if (recg_board[r][c] != drawn[r][c])
            $display("FAIL cell %0d,%0d read %0d drawn %0d", r, c, recg_board[r][c], drawn[r][c]);
    end
    checks++;
    if (cyc < 81 * 256 || cyc > 81 * 256 + 4) begin failures++; $display("FAIL took %0d clocks", cyc); end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0;
    for (int k = 0; k < 20736; k++) img[k] = '0;
    @(negedge clk); @(negedge clk); rst = 1'b0;
    draw_and_run(50);
    draw_and_run(0);
    draw_and_run(100);
    draw_and_run(30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

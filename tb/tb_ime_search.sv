// tb_ime_search: the window port is served from a testbench copy of an SR
// window of a pseudo-random picture. Current MBs are the picture moved by a
// known vector, some with added noise; the result is compared with a full
// search done in the testbench (lowest SAD, first in raster order), and the
// search must take 64*32/8*2 = 512 busy cycles.
module tb_ime_search;
  import fp_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic start = 1'b0, busy, done;
  pix_t cur [MB][MB];
  logic [7:0] win_row, win_col;
  pix_t win [IME_ROWS][MB+IME_PAR-1];
  logic signed [7:0] best_x, best_y;
  logic [15:0] best_sad;
  int mem [SR_ROWS][WIN_COLS];
  int checks = 0, failures = 0;
  ime_search dut (.*);

  always_comb
    for (int r = 0; r < IME_ROWS; r++)
      for (int c = 0; c < MB + IME_PAR - 1; c++) win[r][c] = 8'(mem[win_row + r][win_col + c]);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 6; t++) begin
      int mx, my, ex, ey, es, cyc;
      for (int r = 0; r < SR_ROWS; r++)
        for (int c = 0; c < WIN_COLS; c++) mem[r][c] = pel(t, 200 + c, 100 + r);
      mx = int'($urandom % 64) - 32; my = int'($urandom % 32) - 16;
      for (int y = 0; y < MB; y++)
        for (int x = 0; x < MB; x++)
          cur[y][x] = 8'(clip(mem[MB_Y0 + y + my][MB_X0 + x + mx] + ((t >= 3) ? int'($urandom % 41) - 20 : 0)));
      es = 1 << 30; ex = 0; ey = 0;
      for (int vy = -16; vy < 16; vy++)
        for (int vx = -32; vx < 32; vx++) begin
          int s;
          s = 0;
          for (int y = 0; y < MB; y++)
            for (int x = 0; x < MB; x++) begin
              int d;
              d = int'(cur[y][x]) - mem[MB_Y0 + y + vy][MB_X0 + x + vx];
              s += (d < 0) ? -d : d;
            end
          if (s < es) begin es = s; ex = vx; ey = vy; end
        end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 0;
      while (!done) begin
        if (busy) cyc++;
        @(negedge clk);
      end
      check(int'(best_x) == ex && int'(best_y) == ey && int'(best_sad) == es,
            $sformatf("test %0d: (%0d,%0d) sad %0d, expected (%0d,%0d) sad %0d", t,
                      best_x, best_y, best_sad, ex, ey, es));
      check(t >= 3 || (ex == mx && ey == my), "noise-free search finds the true motion");
      check(cyc == 512, $sformatf("search took %0d busy cycles", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

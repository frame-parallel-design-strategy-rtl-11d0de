// tb_parallel_ime: two testbench SR windows (reference 0 and 1); the three
// current MBs are moved copies of them. ref_loaded is raised for reference 0
// after 320 cycles and for reference 1 after 640, as the SR loader would do
// on a stall-free bus. Checked: all six vectors and SADs, that the searches
// follow the Fig. 4 order (three on reference 0, then three on reference 1),
// that reference-0 searches run while reference 1 is still loading, and
// that the stage ends within 320 + 6*512 + 16 cycles.
module tb_parallel_ime;
  import fp_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic start = 1'b0, busy, done;
  logic [1:0] ref_loaded = 2'b00;
  pix_t cur [3][MB][MB];
  logic [7:0] win_row, win_col;
  pix_t win0 [IME_ROWS][MB+IME_PAR-1], win1 [IME_ROWS][MB+IME_PAR-1];
  logic signed [7:0] imv_x [3][2], imv_y [3][2];
  logic [15:0] imv_sad [3][2];
  int mem [2][SR_ROWS][WIN_COLS];
  int checks = 0, failures = 0;
  parallel_ime dut (.*);

  always_comb
    for (int r = 0; r < IME_ROWS; r++)
      for (int c = 0; c < MB + IME_PAR - 1; c++) begin
        win0[r][c] = 8'(mem[0][win_row + r][win_col + c]);
        win1[r][c] = 8'(mem[1][win_row + r][win_col + c]);
      end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // order in which searches start: reference of the search being run
  int order [$];
  int overlap = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.s_start) order.push_back(int'(dut.jr) * 3 + int'(dut.jf));
    if (dut.u_search.busy && ref_loaded == 2'b01) overlap++;
  end

  initial begin
    int mvx [3][2], mvy [3][2], cyc;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 2; b++)
      for (int r = 0; r < SR_ROWS; r++)
        for (int c = 0; c < WIN_COLS; c++) mem[b][r][c] = pel(b, 300 + c, 200 + r);
    // B0 and P follow reference 0 well, B1 follows reference 1 well
    for (int f = 0; f < 3; f++) begin
      int b;
      b = (f == 1) ? 1 : 0;
      mvx[f][b] = int'($urandom % 64) - 32; mvy[f][b] = int'($urandom % 32) - 16;
      for (int y = 0; y < MB; y++)
        for (int x = 0; x < MB; x++) cur[f][y][x] = 8'(mem[b][MB_Y0 + y + mvy[f][b]][MB_X0 + x + mvx[f][b]]);
    end
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      if (cyc == 320) ref_loaded[0] = 1'b1;
      if (cyc == 640) ref_loaded[1] = 1'b1;
      @(negedge clk);
      cyc++;
    end
    check(cyc >= 320 + 6 * 512 && cyc <= 320 + 6 * 512 + 16, $sformatf("stage took %0d cycles", cyc));
    check(order.size() == 6, "six searches");
    for (int j = 0; j < 6 && j < order.size(); j++) check(order[j] == j, $sformatf("search %0d was job %0d", j, order[j]));
    check(overlap > 0, "reference-0 search during reference-1 load");
    // the well-matching references must give their true vector with SAD 0
    check(int'(imv_x[0][0]) == mvx[0][0] && int'(imv_y[0][0]) == mvy[0][0] && imv_sad[0][0] == 0, "B0 forward");
    check(int'(imv_x[2][0]) == mvx[2][0] && int'(imv_y[2][0]) == mvy[2][0] && imv_sad[2][0] == 0, "P ref 0");
    check(int'(imv_x[1][1]) == mvx[1][1] && int'(imv_y[1][1]) == mvy[1][1] && imv_sad[1][1] == 0, "B1 backward");
    // the others against a testbench full search
    for (int f = 0; f < 3; f++)
      for (int b = 0; b < 2; b++) begin
        int es, ex, ey;
        es = 1 << 30; ex = 0; ey = 0;
        for (int vy = -16; vy < 16; vy++)
          for (int vx = -32; vx < 32; vx++) begin
            int s;
            s = 0;
            for (int y = 0; y < MB; y++)
              for (int x = 0; x < MB; x++) begin
                int d;
                d = int'(cur[f][y][x]) - mem[b][MB_Y0 + y + vy][MB_X0 + x + vx];
                s += (d < 0) ? -d : d;
              end
            if (s < es) begin es = s; ex = vx; ey = vy; end
          end
        check(int'(imv_x[f][b]) == ex && int'(imv_y[f][b]) == ey && int'(imv_sad[f][b]) == es,
              $sformatf("frame %0d ref %0d: (%0d,%0d)/%0d exp (%0d,%0d)/%0d", f, b,
                        imv_x[f][b], imv_y[f][b], imv_sad[f][b], ex, ey, es));
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

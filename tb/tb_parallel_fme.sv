// tb_parallel_fme: the FME ports of both SR SRAMs are served from testbench
// windows of two pseudo-random reference pictures. Current MBs are built
// with known motion, so the expected decisions follow from the construction:
//   B0 = average of ref 0 and ref 1 at integer vectors -> bi-directional
//   B1 = ref 1 at a horizontal half-pel position        -> backward, half-pel
//   P  = run 0: ref 0 at an integer vector              -> 16x16, reference 0
//        run 1: each 8x8 quadrant of ref 0 at a different half-pel
//               neighbour of one integer vector         -> 8x8 mode
// Also checked: the PE array is fed on 4*9*16*2 = 1152 cycles per MB and
// stays busy on every cycle while the filters run, and no cycle has both
// filters on the same SRAM (assertion in the RTL).
module tb_parallel_fme;
  import fp_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic start = 1'b0, busy, done, pe_active;
  pix_t cur [3][MB][MB];
  logic signed [7:0] imv_x [3][2], imv_y [3][2];
  mv_t mvp [3][2];
  logic [7:0] lambda = 8'd5;
  logic [7:0] sr_row [2], sr_col [2];
  pix_t sr_win [2][6][FME_PIX+5];
  mb_dec_t dec [3];
  int checks = 0, failures = 0;
  localparam int X0 = 400, Y0 = 300;   // picture position of window pixel (0,0)
  parallel_fme dut (.*);

  always_comb
    for (int b = 0; b < 2; b++)
      for (int r = 0; r < 6; r++)
        for (int c = 0; c < FME_PIX + 5; c++)
          sr_win[b][r][c] = 8'(pel(b, X0 + int'(sr_col[b]) + c, Y0 + int'(sr_row[b]) + r));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int mvbits(input int qx, input int qy);
    return se_bits(qx) + se_bits(qy);
  endfunction

  int pe_cnt = 0, run_cnt = 0;
  always @(posedge clk) if (rst_n) begin
    if (pe_active) pe_cnt++;
    if (dut.st == dut.S_RUN) run_cnt++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      int a0x, a0y, b0x, b0y, b1x, b1y, px, py, cyc, p0, r0, l;
      int dqx [4] = '{-2, 2, 0, 0};
      int dqy [4] = '{0, 0, 2, -2};
      l = int'(lambda);
      a0x = int'($urandom % 20) - 10; a0y = int'($urandom % 10) - 5;
      b0x = int'($urandom % 20) - 10; b0y = int'($urandom % 10) - 5;
      b1x = int'($urandom % 20) - 10; b1y = int'($urandom % 10) - 5;
      px  = int'($urandom % 40) - 20; py  = int'($urandom % 20) - 10;
      for (int f = 0; f < 3; f++) for (int b = 0; b < 2; b++) mvp[f][b] = '0;
      mvp[FR_P][0].x = 10'(4 * px);   // P vectors cost nothing extra
      mvp[FR_P][0].y = 10'(4 * py);
      for (int y = 0; y < MB; y++)
        for (int x = 0; x < MB; x++) begin
          int X, Y, q;
          X = X0 + MB_X0 + x; Y = Y0 + MB_Y0 + y;
          q = (y / 8) * 2 + (x / 8);
          cur[FR_B0][y][x] = 8'((pel(0, X + a0x, Y + a0y) + pel(1, X + b0x, Y + b0y) + 1) >> 1);
          cur[FR_B1][y][x] = 8'(halfpel(1, 2 * (X + b1x) + 1, 2 * (Y + b1y)));
          if (run == 0) cur[FR_P][y][x] = 8'(pel(0, X + px, Y + py));
          else          cur[FR_P][y][x] = 8'(halfpel(0, 2 * (X + px) + dqx[q] / 2, 2 * (Y + py) + dqy[q] / 2));
        end
      imv_x[FR_B0][0] = 8'(a0x); imv_y[FR_B0][0] = 8'(a0y);
      imv_x[FR_B0][1] = 8'(b0x); imv_y[FR_B0][1] = 8'(b0y);
      imv_x[FR_B1][0] = 8'(int'($urandom % 20) - 10); imv_y[FR_B1][0] = 8'(int'($urandom % 10) - 5);
      imv_x[FR_B1][1] = 8'(b1x + 1); imv_y[FR_B1][1] = 8'(b1y);     // nearest integer on the right
      imv_x[FR_P][0]  = 8'(px); imv_y[FR_P][0] = 8'(py);
      imv_x[FR_P][1]  = 8'(int'($urandom % 20) - 10); imv_y[FR_P][1] = 8'(int'($urandom % 10) - 5);
      p0 = pe_cnt; r0 = run_cnt;
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      $display("run %0d: FME took %0d cycles", run, cyc);
      check(pe_cnt - p0 == 4 * 9 * 16 * 2, $sformatf("PE array fed %0d cycles", pe_cnt - p0));
      check(run_cnt - r0 == 4 * 9 * 16 * 2, $sformatf("filters ran %0d cycles", run_cnt - r0));
      check(cyc == 4 * (288 + 4) + 3 + 1, $sformatf("FME took %0d cycles", cyc));
      // B0
      check(dec[FR_B0].mode == M16X16 && dec[FR_B0].quad[0].dir == DIR_BI, "B0 16x16 bi-directional");
      check(int'(dec[FR_B0].quad[0].mv0.x) == 4 * a0x && int'(dec[FR_B0].quad[0].mv0.y) == 4 * a0y &&
            int'(dec[FR_B0].quad[0].mv1.x) == 4 * b0x && int'(dec[FR_B0].quad[0].mv1.y) == 4 * b0y, "B0 vectors");
      check(int'(dec[FR_B0].cost) == l * (mvbits(4 * a0x, 4 * a0y) + mvbits(4 * b0x, 4 * b0y) + 1),
            $sformatf("B0 cost %0d", dec[FR_B0].cost));
      // B1
      check(dec[FR_B1].mode == M16X16 && dec[FR_B1].quad[0].dir == DIR_L1, "B1 16x16 backward");
      check(int'(dec[FR_B1].quad[0].mv1.x) == 4 * b1x + 2 && int'(dec[FR_B1].quad[0].mv1.y) == 4 * b1y,
            $sformatf("B1 vector (%0d,%0d)", dec[FR_B1].quad[0].mv1.x, dec[FR_B1].quad[0].mv1.y));
      check(int'(dec[FR_B1].cost) == l * (mvbits(4 * b1x + 2, 4 * b1y) + 1), "B1 cost");
      // P
      if (run == 0) begin
        check(dec[FR_P].mode == M16X16 && dec[FR_P].quad[0].dir == DIR_L0, "P 16x16 reference 0");
        check(int'(dec[FR_P].quad[0].mv0.x) == 4 * px && int'(dec[FR_P].quad[0].mv0.y) == 4 * py, "P vector");
        check(int'(dec[FR_P].cost) == l * (2 + 1), $sformatf("P cost %0d", dec[FR_P].cost));
      end else begin
        int e;
        e = 7 * l;
        for (int q = 0; q < 4; q++) e += l * mvbits(dqx[q], dqy[q]);
        check(dec[FR_P].mode == M8X8, $sformatf("P mode %0d, expected 8x8", dec[FR_P].mode));
        for (int q = 0; q < 4; q++)
          check(dec[FR_P].quad[q].dir == DIR_L0 && int'(dec[FR_P].quad[q].mv0.x) == 4 * px + dqx[q]
                && int'(dec[FR_P].quad[q].mv0.y) == 4 * py + dqy[q], $sformatf("P quadrant %0d", q));
        check(int'(dec[FR_P].cost) == e, $sformatf("P cost %0d expected %0d", dec[FR_P].cost, e));
      end
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

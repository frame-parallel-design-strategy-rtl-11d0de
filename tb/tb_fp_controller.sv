// tb_fp_controller: the controller runs against testbench models of the SR
// loader, IME and FME that finish after fixed latencies. Each MB carries a
// signature (its column) in its pixels and in the IME's vectors. Checked: the
// sequence of stages (IME only for a first MB with a full window load, then
// IME and FME together, an FME-only flush before a new row and at the end),
// the window origin moving by 16 columns per MB and restarting at 0, the
// hand-over of pixels, vectors and origin from the IME to the FME stage, the
// order and coordinates of the results, and a stage lasting as long as its
// slowest unit.
module tb_fp_controller;
  import fp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic cmd_valid = 1'b0, cmd_ready, cmd_first = 1'b0;
  logic signed [11:0] cmd_mb_x = '0, cmd_mb_y = '0;
  pix_t cmd_pix [3][MB][MB];
  logic ld_start, ld_full, ld_busy = 1'b0;
  logic signed [11:0] ld_mb_x, ld_mb_y;
  logic [7:0] ime_base, fme_base;
  logic ime_start, ime_done = 1'b0, fme_start, fme_done = 1'b0;
  pix_t ime_cur [3][MB][MB], fme_cur [3][MB][MB];
  logic signed [7:0] ime_x [3][2], ime_y [3][2], fme_x [3][2], fme_y [3][2];
  logic res_valid, stage_both;
  logic signed [11:0] res_mb_x, res_mb_y;
  int checks = 0, failures = 0;
  fp_controller dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int LD_LAT = 640, IME_LAT = 3000, FME_LAT = 1200;
  int ld_cnt = 0, ime_cnt = 0, fme_cnt = 0;
  // unit models
  always @(posedge clk) begin
    ime_done <= 1'b0;
    fme_done <= 1'b0;
    if (ld_start) begin ld_busy <= 1'b1; ld_cnt = LD_LAT; end
    else if (ld_cnt > 0) begin ld_cnt--; if (ld_cnt == 0) ld_busy <= 1'b0; end
    if (ime_start) ime_cnt = IME_LAT;
    else if (ime_cnt > 0) begin
      ime_cnt--;
      if (ime_cnt == 0) begin
        ime_done <= 1'b1;
        for (int f = 0; f < 3; f++) for (int r = 0; r < 2; r++) begin
          ime_x[f][r] <= 8'(ime_cur[0][0][0]); ime_y[f][r] <= 8'(f * 2 + r);
        end
      end
    end
    if (fme_start) fme_cnt = FME_LAT;
    else if (fme_cnt > 0) begin fme_cnt--; if (fme_cnt == 0) fme_done <= 1'b1; end
  end

  // expected stages: {ime mb (-1 none), fme mb (-1 none), full load, base}
  typedef struct { int ime; int fme; bit full; int base; } stage_t;
  stage_t exp_st [$];
  int exp_res [$];
  int t_last = 0, cyc = 0, stage_len [$];
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n && (ime_start || fme_start)) begin
    stage_t e;
    stage_len.push_back(cyc - t_last);
    t_last = cyc;
    if (exp_st.size() == 0) check(1'b0, "unexpected stage");
    else begin
      e = exp_st.pop_front();
      check(ime_start == (e.ime >= 0), $sformatf("stage IME %0d expected %0d", ime_start, e.ime));
      check(fme_start == (e.fme >= 0), $sformatf("stage FME %0d expected %0d", fme_start, e.fme));
      check(stage_both == (e.ime >= 0 && e.fme >= 0), "stage_both flag");
      if (e.ime >= 0) begin
        check(ld_start && ld_full == e.full && int'(ld_mb_x) == e.ime, "loader start");
        check(int'(ime_base) == e.base, $sformatf("IME window origin %0d expected %0d", ime_base, e.base));
        check(int'(ime_cur[1][3][5]) == e.ime, "current MB to IME");
      end
      if (e.fme >= 0) begin
        check(int'(fme_cur[2][15][15]) == e.fme, "current MB to FME");
        check(int'(fme_x[1][1]) == e.fme && int'(fme_y[2][1]) == 5, "IME vectors to FME");
        check(int'(fme_base) == (e.fme - 4) * 16 % SR_COLS, $sformatf("FME window origin %0d", fme_base));
      end
    end
  end

  always @(posedge clk) if (rst_n && res_valid) begin
    int e;
    e = (exp_res.size() > 0) ? exp_res.pop_front() : -99;
    check(int'(res_mb_x) == e, $sformatf("result for MB %0d expected %0d", res_mb_x, e));
  end

  task automatic send(input int mx, input int my, input bit first);
    @(negedge clk);
    for (int f = 0; f < 3; f++) for (int y = 0; y < MB; y++) for (int x = 0; x < MB; x++)
      cmd_pix[f][y][x] = 8'(mx);
    cmd_mb_x = 12'(mx); cmd_mb_y = 12'(my); cmd_first = first; cmd_valid = 1'b1;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  initial begin
    for (int f = 0; f < 3; f++) for (int y = 0; y < MB; y++) for (int x = 0; x < MB; x++) cmd_pix[f][y][x] = '0;
    exp_st.push_back('{4, -1, 1'b1, 0});
    exp_st.push_back('{5, 4, 1'b0, 16});
    exp_st.push_back('{6, 5, 1'b0, 32});
    exp_st.push_back('{-1, 6, 1'b0, 0});
    exp_st.push_back('{4, -1, 1'b1, 0});
    exp_st.push_back('{-1, 4, 1'b0, 0});
    exp_res = '{4, 5, 6, 4};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    send(4, 1, 1'b1);
    send(5, 1, 1'b0);
    send(6, 1, 1'b0);
    send(4, 2, 1'b1);
    repeat (8000) @(negedge clk);
    check(exp_st.size() == 0, "all stages ran");
    check(exp_res.size() == 0, "all results out");
    // stages 1..3 are bounded by the IME (3000 cycles), stage 4 by the FME alone
    for (int i = 2; i <= 3; i++)
      check(stage_len[i] >= IME_LAT && stage_len[i] <= IME_LAT + 4, $sformatf("stage %0d lasted %0d", i, stage_len[i]));
    check(stage_len[4] >= FME_LAT && stage_len[4] <= FME_LAT + 4, $sformatf("flush stage lasted %0d", stage_len[4]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #400000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

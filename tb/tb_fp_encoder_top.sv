// tb_fp_encoder_top: end-to-end test of the frame-parallel core at its
// default sizes (720p IBBP, 64x32 IME range, 32-bit bus).
//
// Two pseudo-random reference pictures are served by a behavioural bus
// model (one-cycle latency). For every MB position the three current MBs are
// built from the references with known motion:
//   B0 = average of ref 0 moved by a0 and ref 1 moved by b0 -> bi-directional
//   B1 = ref 1 at a horizontal half-pel position b1 + 1/2   -> backward, half-pel
//   P  = ref 0 moved by p                                  -> reference 0
// so the expected decision (16x16, direction, vectors, cost) follows from the
// construction. Two MB rows are run: three MBs of row 1 with the grant held
// high (cycle counts checked against 320 + 6*512 load+search cycles and 640
// bus words per MB position), then two MBs of row 2 with random bus stalls.
// Mechanisms counted: IME overlapping reference-1 loading, IME/FME stage
// overlap, full window loads, FME-only flush stages, bus stalls, a fully
// busy PE array, bi-directional and half-pel decisions.
module tb_fp_encoder_top;
  import fp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic               cmd_valid = 1'b0, cmd_ready, cmd_first = 1'b0;
  logic signed [11:0] cmd_mb_x = '0, cmd_mb_y = '0;
  pix_t               cmd_pix [3][MB][MB];
  mv_t                mvp [3][2];
  logic [7:0]         lambda = 8'd4;
  logic               bus_req, bus_ref, bus_gnt, bus_rvalid = 1'b0;
  logic signed [15:0] bus_x, bus_y;
  logic [31:0]        bus_rdata = '0;
  logic               res_valid;
  logic signed [11:0] res_mb_x, res_mb_y;
  mb_dec_t            res_dec [3];
  logic [1:0]         ref_loaded;
  logic               pe_active, stage_both;

  fp_encoder_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- behavioural system bus ----------------------------------------------------
  bit stall_mode = 1'b0;
  int n_words = 0, n_stalls = 0;
  always_comb bus_gnt = stall_mode ? dut_gnt_rand : 1'b1;
  logic dut_gnt_rand = 1'b1;
  always_ff @(posedge clk) begin
    dut_gnt_rand <= ($urandom % 4) != 0;
    bus_rvalid   <= bus_req && bus_gnt;
    if (bus_req && bus_gnt) begin
      n_words <= n_words + 1;
      for (int k = 0; k < 4; k++)
        bus_rdata[8*k +: 8] <= 8'(pel(int'(bus_ref), int'(bus_x) + k, int'(bus_y)));
    end
    if (bus_req && !bus_gnt) n_stalls <= n_stalls + 1;
  end

  // ---- mechanism counters ---------------------------------------------------------
  int n_overlap_load = 0, n_both = 0, n_full = 0, n_flush = 0, n_pe = 0;
  int n_bi = 0, n_half = 0;
  always_ff @(posedge clk) if (rst_n) begin
    if (dut.u_ime.u_search.busy && ref_loaded == 2'b01) n_overlap_load <= n_overlap_load + 1;
    if (dut.u_ctrl.ime_start && stage_both) n_both <= n_both + 1;
    if (dut.u_ctrl.ld_start && dut.u_ctrl.ld_full) n_full <= n_full + 1;
    if (dut.u_ctrl.fme_start && !stage_both) n_flush <= n_flush + 1;
    if (pe_active) n_pe <= n_pe + 1;
  end

  // ---- stimulus ----------------------------------------------------------------------
  typedef struct { int a0x, a0y, b0x, b0y, b1x, b1y, px, py; } motion_t;

  function automatic motion_t motion(input int mx, input int my);
    motion_t m;
    m.a0x = (mx * 7 + my) % 9 - 4;   m.a0y = (mx + 2 * my) % 5 - 2;
    m.b0x = (mx * 3 + 1) % 11 - 5;   m.b0y = (mx + my) % 7 - 3;
    m.b1x = (mx * 5 + my) % 13 - 6;  m.b1y = (mx * 2) % 5 - 2;
    m.px  = (mx * 11 + 3) % 41 - 20; m.py  = (mx * 3 + my) % 21 - 10;
    return m;
  endfunction

  task automatic build_mb(input int mx, input int my);
    motion_t m = motion(mx, my);
    for (int y = 0; y < MB; y++)
      for (int x = 0; x < MB; x++) begin
        int X, Y;
        X = mx * MB + x; Y = my * MB + y;
        cmd_pix[FR_B0][y][x] = 8'((pel(0, X + m.a0x, Y + m.a0y) + pel(1, X + m.b0x, Y + m.b0y) + 1) >> 1);
        cmd_pix[FR_B1][y][x] = 8'(halfpel(1, 2 * (X + m.b1x) + 1, 2 * (Y + m.b1y)));
        cmd_pix[FR_P][y][x]  = 8'(pel(0, X + m.px, Y + m.py));
      end
  endtask

  function automatic int mvbits(input int qx, input int qy);
    return se_bits(qx) + se_bits(qy);
  endfunction

  task automatic check_quads(input mb_dec_t d, input dir_e dir, input int m0x, m0y, m1x, m1y,
                             input string tag);
    for (int q = 0; q < 4; q++) begin
      check(d.quad[q].dir == dir, $sformatf("%s quad %0d dir %0d", tag, q, d.quad[q].dir));
      check(int'(d.quad[q].mv0.x) == m0x && int'(d.quad[q].mv0.y) == m0y,
            $sformatf("%s quad %0d mv0 (%0d,%0d) exp (%0d,%0d)", tag, q,
                      d.quad[q].mv0.x, d.quad[q].mv0.y, m0x, m0y));
      check(int'(d.quad[q].mv1.x) == m1x && int'(d.quad[q].mv1.y) == m1y,
            $sformatf("%s quad %0d mv1 (%0d,%0d) exp (%0d,%0d)", tag, q,
                      d.quad[q].mv1.x, d.quad[q].mv1.y, m1x, m1y));
    end
  endtask

  task automatic check_result();
    motion_t m;
    int mx, my, l;
    mx = int'(res_mb_x); my = int'(res_mb_y); l = int'(lambda);
    m = motion(mx, my);
    // B0: bi-directional at the integer shifts, SATD 0
    check(res_dec[FR_B0].mode == M16X16, $sformatf("B0 mode %0d", res_dec[FR_B0].mode));
    check(int'(res_dec[FR_B0].cost) == l * (mvbits(4 * m.a0x, 4 * m.a0y) + mvbits(4 * m.b0x, 4 * m.b0y) + 1),
          $sformatf("B0 cost %0d", res_dec[FR_B0].cost));
    check_quads(res_dec[FR_B0], DIR_BI, 4 * m.a0x, 4 * m.a0y, 4 * m.b0x, 4 * m.b0y, "B0");
    // B1: backward, horizontal half-pel
    check(res_dec[FR_B1].mode == M16X16, $sformatf("B1 mode %0d", res_dec[FR_B1].mode));
    check(int'(res_dec[FR_B1].cost) == l * (mvbits(4 * m.b1x + 2, 4 * m.b1y) + 1),
          $sformatf("B1 cost %0d", res_dec[FR_B1].cost));
    check_quads(res_dec[FR_B1], DIR_L1, 0, 0, 4 * m.b1x + 2, 4 * m.b1y, "B1");
    // P: reference 0
    check(res_dec[FR_P].mode == M16X16, $sformatf("P mode %0d", res_dec[FR_P].mode));
    check(int'(res_dec[FR_P].cost) == l * (mvbits(4 * m.px, 4 * m.py) + 1),
          $sformatf("P cost %0d", res_dec[FR_P].cost));
    check_quads(res_dec[FR_P], DIR_L0, 4 * m.px, 4 * m.py, 0, 0, "P");
    if (res_dec[FR_B0].quad[0].dir == DIR_BI) n_bi++;
    if (res_dec[FR_B1].quad[0].mv1.x[1]) n_half++;
  endtask

  int n_res = 0;
  always @(posedge clk) if (res_valid) begin
    $display("result MB (%0d,%0d) at %0t", res_mb_x, res_mb_y, $time);
    check_result();
    n_res++;
  end

  // IME stage length: from its start to its done
  int ime_t0 = 0, ime_len [$];
  always @(posedge clk) begin
    if (dut.u_ctrl.ime_start) ime_t0 = 0;
    else ime_t0++;
    if (rst_n && dut.u_ime.done) ime_len.push_back(ime_t0 + 1);
  end

  // drive on the falling edge; the command is taken at the next rising edge
  // on which cmd_ready is high
  task automatic send(input int mx, input int my, input bit first);
    @(negedge clk);
    build_mb(mx, my);
    cmd_mb_x  = 12'(mx);
    cmd_mb_y  = 12'(my);
    cmd_first = first;
    cmd_valid = 1'b1;
    #1;   // let the handshake settle
    while (!cmd_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  int words_at [$];
  always @(posedge clk) if (rst_n && dut.u_ctrl.ld_start) words_at.push_back(n_words);

  initial begin
    for (int f = 0; f < 3; f++) for (int r = 0; r < 2; r++) mvp[f][r] = '0;
    for (int f = 0; f < 3; f++) for (int y = 0; y < MB; y++) for (int x = 0; x < MB; x++)
      cmd_pix[f][y][x] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    send(4, 1, 1'b1);
    send(5, 1, 1'b0);
    send(6, 1, 1'b0);
    // wait until row 1 is through the IME, then stall the bus for row 2
    wait (n_res == 2);
    stall_mode = 1'b1;
    send(4, 2, 1'b1);
    send(5, 2, 1'b0);
    wait (n_res == 5);
    repeat (5) @(posedge clk);

    $display("IME stage lengths: %p", ime_len);
    $display("bus words at each load start: %p", words_at);
    // second and third IME stages: one strip per reference, bus never stalled
    for (int i = 1; i <= 2; i++) begin
      check(ime_len[i] >= 320 + 6 * 512 && ime_len[i] <= 320 + 6 * 512 + 16,
            $sformatf("IME stage %0d took %0d cycles, expected 3392..3408", i, ime_len[i]));
      check(words_at[i + 1] - words_at[i] == 640,
            $sformatf("bus words for MB position %0d: %0d, expected 640", i, words_at[i + 1] - words_at[i]));
    end
    check(words_at[1] - words_at[0] == 2 * 9 * 320, "full window load: 5760 words");
    check(n_pe == 5 * 4 * 9 * 16 * 2, $sformatf("PE array busy %0d cycles, expected %0d", n_pe, 5 * 1152));

    check(n_res == 5, "five MB results");
    check(n_overlap_load > 0, "IME on reference 0 while reference 1 loads");
    check(n_both > 0,         "IME and FME stages overlapping");
    check(n_full == 2,        "full window load at each row start");
    check(n_flush >= 1,       "FME-only flush stage");
    check(n_stalls > 0,       "bus stalls");
    check(n_bi == 5,          "bi-directional decisions");
    check(n_half == 5,        "half-pel decisions");
    $display("overlap=%0d both=%0d full=%0d flush=%0d stalls=%0d pe=%0d bi=%0d half=%0d",
             n_overlap_load, n_both, n_full, n_flush, n_stalls, n_pe, n_bi, n_half);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sr_loader: the loader fetches from a behavioural bus (one-cycle
// latency) and its writes go into a shadow SR memory. Checked: a full
// window load (5760 words) then single-strip loads (640 words, 320 per
// reference), that every written pixel equals the reference picture at
// the window position, the ref_loaded order, and, with the grant held high,
// that reference 0 is complete 322 cycles after start is sampled (one
// cycle to take the start, 320 words, one cycle of memory latency).
// A run with random grants checks the loader under bus stalls.
module tb_sr_loader;
  import fp_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic start = 1'b0, full = 1'b0;
  logic signed [11:0] mb_x = '0, mb_y = '0;
  logic [7:0] win_base = '0;
  logic [1:0] ref_loaded;
  logic busy, bus_req, bus_ref, bus_gnt = 1'b1, bus_rvalid = 1'b0;
  logic signed [15:0] bus_x, bus_y;
  logic [31:0] bus_rdata = '0;
  logic [1:0] sr_we;
  logic [7:0] sr_row, sr_col;
  logic [31:0] sr_data;
  int checks = 0, failures = 0, words = 0, stalls = 0;
  bit rand_gnt = 1'b0;
  int shadow [2][SR_ROWS][SR_COLS];
  sr_loader dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always_ff @(posedge clk) begin
    bus_rvalid <= bus_req && bus_gnt;
    if (bus_req && bus_gnt) begin
      words <= words + 1;
      for (int k = 0; k < 4; k++) bus_rdata[8*k +: 8] <= 8'(pel(int'(bus_ref), int'(bus_x) + k, int'(bus_y)));
    end
    if (bus_req && !bus_gnt) stalls <= stalls + 1;
    if (rand_gnt) bus_gnt <= ($urandom % 3) != 0;
    for (int b = 0; b < 2; b++)
      if (sr_we[b]) for (int k = 0; k < 4; k++) shadow[b][sr_row][int'(sr_col) + k] = int'(sr_data[8*k +: 8]);
  end

  task automatic load(input int mx, input int my, input bit f, input int base, output int t0, output int t1);
    int w0, cyc;
    w0 = words;
    @(negedge clk);
    start = 1'b1; full = f; mb_x = 12'(mx); mb_y = 12'(my); win_base = 8'(base);
    @(negedge clk);
    start = 1'b0;
    cyc = 1; t0 = -1;
    while (busy) begin
      if (ref_loaded[0] && t0 < 0) t0 = cyc;
      check(!(ref_loaded[1] && !ref_loaded[0]), "reference 1 complete before reference 0");
      @(negedge clk);
      cyc++;
    end
    t1 = cyc;
    check(words - w0 == (f ? 2 * 9 * STRIP_WORDS : 2 * STRIP_WORDS),
          $sformatf("load of %0d words", words - w0));
    check(ref_loaded == 2'b11, "both references loaded");
  endtask

  task automatic compare(input int mx, input int my, input int base);
    int bad = 0;
    for (int b = 0; b < 2; b++)
      for (int r = 0; r < SR_ROWS; r++)
        for (int c = 0; c < WIN_COLS; c++)
          if (shadow[b][r][(base + c) % SR_COLS] != pel(b, mx * MB - int'(MB_X0) + c, my * MB - int'(MB_Y0) + r)) bad++;
    check(bad == 0, $sformatf("window of MB (%0d,%0d): %0d wrong pixels", mx, my, bad));
  endtask

  initial begin
    int t0, t1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    load(3, 2, 1'b1, 0, t0, t1);
    compare(3, 2, 0);
    for (int i = 1; i <= 12; i++) begin
      load(3 + i, 2, 1'b0, (16 * i) % SR_COLS, t0, t1);
      check(t0 == STRIP_WORDS + 2, $sformatf("reference 0 ready after %0d cycles", t0));
      compare(3 + i, 2, (16 * i) % SR_COLS);
    end
    rand_gnt = 1'b1;
    load(16, 2, 1'b0, (16 * 13) % SR_COLS, t0, t1);
    compare(16, 2, (16 * 13) % SR_COLS);
    check(stalls > 0, "bus stalls happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

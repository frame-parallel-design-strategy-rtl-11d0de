// tb_hadamard_pe: random 4x4 residual blocks of two lanes, fed row by row
// with the lanes interleaved as the FME does; each SATD is compared, one
// cycle after the fourth row, with the matrix-form Hadamard SATD.
module tb_hadamard_pe;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic in_valid = 1'b0, in_lane = 1'b0;
  logic [1:0] in_row = '0;
  logic signed [8:0] in_res [4];
  logic out_valid, out_lane;
  logic [15:0] out_satd;
  int checks = 0, failures = 0;
  hadamard_pe dut (.*);

  int blk [2][4][4];
  int expq [$];
  initial begin
    for (int k = 0; k < 4; k++) in_res[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 100; t++) begin
      for (int l = 0; l < 2; l++)
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++)
            blk[l][r][c] = (t == 0) ? ((r + c) % 2 ? -255 : 255) : int'($urandom % 511) - 255;
      for (int r = 0; r < 4; r++)
        for (int l = 0; l < 2; l++) begin
          @(negedge clk);
          in_valid = 1'b1; in_lane = 1'(l); in_row = 2'(r);
          for (int c = 0; c < 4; c++) in_res[c] = 9'(blk[l][r][c]);
          if (r == 3) expq.push_back(satd4(blk[l]) * 2 + l);
        end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    e = expq.pop_front();
    checks++;
    if (int'(out_satd) != e / 2 || int'(out_lane) != e % 2) begin
      failures++;
      $display("FAIL: satd %0d lane %0d, expected %0d lane %0d", out_satd, out_lane, e / 2, e % 2);
    end
  end
  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

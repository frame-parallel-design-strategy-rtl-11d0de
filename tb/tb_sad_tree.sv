// tb_sad_tree: random 16x8 blocks; the SAD is compared with a sum computed
// in the testbench.
module tb_sad_tree;
  import fp_pkg::*;
  pix_t cur [IME_ROWS][MB], refp [IME_ROWS][MB];
  logic [14:0] sad;
  int checks = 0, failures = 0;
  sad_tree dut (.cur, .refp, .sad);
  initial begin
    for (int t = 0; t < 200; t++) begin
      int e;
      e = 0;
      for (int r = 0; r < IME_ROWS; r++)
        for (int c = 0; c < MB; c++) begin
          cur[r][c]  = (t == 0) ? 8'd255 : 8'($urandom);
          refp[r][c] = (t == 0) ? 8'd0   : 8'($urandom);
          e += (int'(cur[r][c]) > int'(refp[r][c])) ? int'(cur[r][c]) - int'(refp[r][c])
                                                  : int'(refp[r][c]) - int'(cur[r][c]);
        end
      #1;
      checks++;
      if (int'(sad) != e) begin
        failures++;
        $display("FAIL: test %0d sad %0d expected %0d", t, sad, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

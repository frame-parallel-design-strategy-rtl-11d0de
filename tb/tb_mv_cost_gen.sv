// tb_mv_cost_gen: random vectors, predictors and lambdas; the cost is
// compared with lambda times the se(v) code lengths counted in the testbench.
module tb_mv_cost_gen;
  import fp_pkg::*;
  import tb_ref_pkg::*;
  mv_t mv, mvp;
  logic [7:0] lambda;
  cost_t cost;
  int checks = 0, failures = 0;
  mv_cost_gen dut (.mv, .mvp, .lambda, .cost);
  initial begin
    for (int t = 0; t < 500; t++) begin
      int e;
      mv.x   = 10'(int'($urandom % 400) - 200);
      mv.y   = 10'(int'($urandom % 400) - 200);
      mvp.x  = (t % 3 == 0) ? 10'd0 : 10'(int'($urandom % 64) - 32);
      mvp.y  = (t % 3 == 0) ? 10'd0 : 10'(int'($urandom % 64) - 32);
      if (t < 5) begin mv.x = 10'(t - 2); mv.y = 10'(2 - t); mvp = '0; end
      lambda = 8'($urandom);
      #1;
      e = int'(lambda) * (se_bits(int'(mv.x) - int'(mvp.x)) + se_bits(int'(mv.y) - int'(mvp.y)));
      checks++;
      if (int'(cost) != e) begin
        failures++;
        $display("FAIL: mv (%0d,%0d) mvp (%0d,%0d) l %0d cost %0d exp %0d",
                 mv.x, mv.y, mvp.x, mvp.y, lambda, cost, e);
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

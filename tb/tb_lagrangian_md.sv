// tb_lagrangian_md: random partition costs and vectors for the three
// directions (with an unsearched direction at the all-ones cost now and
// then); mode, total cost and per-quadrant direction and vectors are
// compared with a decision worked out in the testbench.
module tb_lagrangian_md;
  import fp_pkg::*;
  part_res_t res [3][N_PART];
  logic [7:0] lambda;
  mb_dec_t dec;
  int checks = 0, failures = 0;
  lagrangian_md dut (.res, .lambda, .dec);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 300; t++) begin
      int bc [N_PART], bd [N_PART], jm [4], bits [4], em, q2p;
      bits = '{1, 3, 3, 7};
      lambda = 8'($urandom % 16);
      for (int d = 0; d < 3; d++)
        for (int p = 0; p < N_PART; p++) begin
          res[d][p].cost = (d == 2 && t % 4 == 0) ? '1 : cost_t'($urandom % ((p == 0) ? 4000 : 1200));
          res[d][p].mv0  = mv_t'($urandom);
          res[d][p].mv1  = mv_t'($urandom);
        end
      #1;
      for (int p = 0; p < N_PART; p++) begin
        bd[p] = 0; bc[p] = int'(res[0][p].cost);
        for (int d = 1; d < 3; d++)
          if (int'(res[d][p].cost) < bc[p]) begin bc[p] = int'(res[d][p].cost); bd[p] = d; end
      end
      jm[0] = bc[0] + bits[0] * lambda;
      jm[1] = bc[1] + bc[2] + bits[1] * lambda;
      jm[2] = bc[3] + bc[4] + bits[2] * lambda;
      jm[3] = bc[5] + bc[6] + bc[7] + bc[8] + bits[3] * lambda;
      em = 0;
      for (int m = 1; m < 4; m++) if (jm[m] < jm[em]) em = m;
      check(int'(dec.mode) == em, $sformatf("t%0d mode %0d exp %0d", t, dec.mode, em));
      check(int'(dec.cost) == jm[em], $sformatf("t%0d cost %0d exp %0d", t, dec.cost, jm[em]));
      for (int q = 0; q < 4; q++) begin
        q2p = (em == 0) ? 0 : (em == 1) ? 1 + q / 2 : (em == 2) ? 3 + q % 2 : 5 + q;
        check(int'(dec.quad[q].dir) == bd[q2p] && dec.quad[q].mv0 == res[bd[q2p]][q2p].mv0
              && dec.quad[q].mv1 == res[bd[q2p]][q2p].mv1, $sformatf("t%0d quad %0d", t, q));
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

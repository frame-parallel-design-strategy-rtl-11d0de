// tb_mode_cost_gen: every mode at several lambdas against the mb_type code
// lengths of H.264 P macroblocks (ue(0)=1, ue(1)=ue(2)=ue(3)=3 bits, plus
// four 1-bit sub_mb_type codes for 8x8).
module tb_mode_cost_gen;
  import fp_pkg::*;
  mode_e mode;
  logic [7:0] lambda;
  cost_t cost;
  int checks = 0, failures = 0;
  int bits [4] = '{1, 3, 3, 3 + 4};
  mode_cost_gen dut (.mode, .lambda, .cost);
  initial begin
    for (int l = 0; l < 256; l += 17)
      for (int m = 0; m < 4; m++) begin
        mode = mode_e'(m); lambda = 8'(l);
        #1;
        checks++;
        if (int'(cost) != l * bits[m]) begin
          failures++;
          $display("FAIL: mode %0d lambda %0d cost %0d", m, l, cost);
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

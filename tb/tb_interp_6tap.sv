// tb_interp_6tap: windows cut from a pseudo-random picture; all four
// half-pel phases are compared with the interpolation written from the H.264
// definition in tb_ref_pkg.
module tb_interp_6tap;
  import fp_pkg::*;
  import tb_ref_pkg::*;
  pix_t win [6][FME_PIX+5];
  pix_t pred [FME_PIX];
  logic fx, fy;
  int checks = 0, failures = 0;
  interp_6tap dut (.win, .fx, .fy, .pred);
  initial begin
    for (int t = 0; t < 200; t++) begin
      int x0, y0;
      x0 = int'($urandom % 1200) + 8; y0 = int'($urandom % 700) + 4;
      for (int r = 0; r < 6; r++)
        for (int c = 0; c < FME_PIX + 5; c++) win[r][c] = 8'(pel(t % 2, x0 - 2 + c, y0 - 2 + r));
      for (int ph = 0; ph < 4; ph++) begin
        fx = ph[0]; fy = ph[1];
        #1;
        for (int c = 0; c < FME_PIX; c++) begin
          int e;
          e = halfpel(t % 2, 2 * (x0 + c) + ph[0], 2 * y0 + ph[1]);
          checks++;
          if (int'(pred[c]) != e) begin
            failures++;
            $display("FAIL: phase %0d pixel %0d got %0d exp %0d", ph, c, pred[c], e);
          end
        end
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

// tb_sr_bank: fills the bank with random bus words, keeps a shadow copy,
// and reads IME and FME windows at random logical positions and window
// origins, including windows that wrap around the circular column range.
module tb_sr_bank;
  import fp_pkg::*;
  logic clk = 1'b0;
  always #5 clk = !clk;
  logic we = 1'b0;
  logic [7:0] wr_row = '0, wr_col = '0, ime_base = '0, ime_row = '0, ime_col = '0;
  logic [7:0] fme_base = '0, fme_row = '0, fme_col = '0;
  logic [31:0] wr_data = '0;
  pix_t ime_win [IME_ROWS][MB+IME_PAR-1];
  pix_t fme_win [6][FME_PIX+5];
  int shadow [SR_ROWS][SR_COLS];
  int checks = 0, failures = 0;
  sr_bank dut (.*);
  initial begin
    for (int r = 0; r < SR_ROWS; r++)
      for (int c = 0; c < SR_COLS; c += 4) begin
        @(negedge clk);
        we = 1'b1; wr_row = 8'(r); wr_col = 8'(c); wr_data = $urandom;
        for (int k = 0; k < 4; k++) shadow[r][c + k] = int'(wr_data[8*k +: 8]);
      end
    @(negedge clk);
    we = 1'b0;
    for (int t = 0; t < 300; t++) begin
      int bad;
      ime_base = 8'(16 * ($urandom % 10)); fme_base = 8'(16 * ($urandom % 10));
      ime_row = 8'($urandom % (SR_ROWS - IME_ROWS + 1));
      ime_col = 8'($urandom % (SR_COLS - MB - IME_PAR + 2));
      fme_row = 8'($urandom % (SR_ROWS - 5));
      fme_col = 8'($urandom % (SR_COLS - FME_PIX - 4));
      #1;
      bad = 0;
      for (int r = 0; r < IME_ROWS; r++)
        for (int c = 0; c < MB + IME_PAR - 1; c++)
          if (int'(ime_win[r][c]) != shadow[ime_row + r][(ime_base + ime_col + c) % SR_COLS]) bad++;
      checks++;
      if (bad) begin failures++; $display("FAIL: IME window %0d wrong pixels", bad); end
      bad = 0;
      for (int r = 0; r < 6; r++)
        for (int c = 0; c < FME_PIX + 5; c++)
          if (int'(fme_win[r][c]) != shadow[fme_row + r][(fme_base + fme_col + c) % SR_COLS]) bad++;
      checks++;
      if (bad) begin failures++; $display("FAIL: FME window %0d wrong pixels", bad); end
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

// hadamard_pe: 4x4 Hadamard transform processing element for SATD.
//
// Receives one 4-pixel row of residuals per cycle. It keeps the first three
// rows of a 4x4 block and, with the fourth, transforms the block
// (rows, then columns, with the 4-point Hadamard butterfly) and returns
// SATD = (sum of |coefficients| + 1) >> 1 one cycle later. Rows of two
// interleaved blocks may arrive alternately: each row carries a `lane` tag
// and the PE keeps separate row storage per lane. This is what lets the FME
// feed it from interpolation filter 0 and filter 1 on alternate cycles and
// keep it busy every cycle.
//
// Timing: in_valid/in_lane/in_row/in_res in cycle t; when in_row == 3,
// out_valid with out_lane and out_satd in cycle t+1.
// The halving of the sum follows common H.264 encoder practice; the source
// gives no formula.
module hadamard_pe
  import fp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_lane,
  input  logic [1:0]        in_row,
  input  logic signed [8:0] in_res [4],
  output logic              out_valid,
  output logic              out_lane,
  output logic [15:0]       out_satd
);
  logic signed [8:0] rows [2][3][4];
  logic signed [8:0] blk  [4][4];
  logic signed [15:0] t   [4][4];
  logic signed [15:0] u   [4][4];
  logic [15:0] sum;

  function automatic void bfly(input logic signed [15:0] a0, a1, a2, a3,
                               output logic signed [15:0] b0, b1, b2, b3);
    logic signed [15:0] s0, s1, d0, d1;
    s0 = a0 + a3; s1 = a1 + a2; d0 = a0 - a3; d1 = a1 - a2;
    b0 = s0 + s1; b1 = d0 + d1; b2 = s0 - s1; b3 = d0 - d1;
  endfunction

  always_comb begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 4; c++) blk[r][c] = rows[in_lane][r][c];
    for (int c = 0; c < 4; c++) blk[3][c] = in_res[c];
    for (int r = 0; r < 4; r++)
      bfly(16'(blk[r][0]), 16'(blk[r][1]), 16'(blk[r][2]), 16'(blk[r][3]),
           t[r][0], t[r][1], t[r][2], t[r][3]);
    for (int c = 0; c < 4; c++)
      bfly(t[0][c], t[1][c], t[2][c], t[3][c], u[0][c], u[1][c], u[2][c], u[3][c]);
    sum = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        sum = sum + ((u[r][c] < 0) ? 16'(-u[r][c]) : 16'(u[r][c]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_lane <= 1'b0; out_satd <= '0;
      for (int l = 0; l < 2; l++)
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 4; c++) rows[l][r][c] <= '0;
    end else begin
      out_valid <= in_valid && (in_row == 2'd3);
      if (in_valid) begin
        if (in_row != 2'd3) begin
          for (int c = 0; c < 4; c++) rows[in_lane][in_row][c] <= in_res[c];
        end else begin
          out_lane <= in_lane;
          out_satd <= (sum + 16'd1) >> 1;
        end
      end
    end
  end
endmodule

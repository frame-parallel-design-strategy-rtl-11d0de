// interp_6tap: H.264 6-tap luma interpolation filter, N pixels per cycle.
//
// Produces N horizontally adjacent prediction pixels at half-pel phase
// (fx, fy) from a 6 x (N+5) integer-pel window whose top-left pixel lies two
// rows above and two columns left of the first output's integer position:
//   fx=0,fy=0  integer pixel
//   fx=1,fy=0  horizontal half-pel  b = clip((tap6 row + 16) >> 5)
//   fx=0,fy=1  vertical half-pel    h = clip((tap6 column + 16) >> 5)
//   fx=1,fy=1  centre half-pel      j = clip((tap6 of unrounded b's + 512) >> 10)
// with tap6 = (1,-5,20,20,-5,1), as the H.264 standard defines them.
// Combinational; the FME has two of these ("interpolation filter 0/1"), each
// fed from either reference SRAM through a MUX. N = 8 pixels per cycle follows
// the 8-pixel FME parallelism the source recommends.
module interp_6tap
  import fp_pkg::*;
#(
  parameter int unsigned N = FME_PIX
) (
  input  pix_t  win [6][N+5],
  input  logic  fx,
  input  logic  fy,
  output pix_t  pred [N]
);
  logic signed [23:0] hrow [6][N];   // unrounded horizontal half-pel of each row

  always_comb begin
    for (int r = 0; r < 6; r++)
      for (int c = 0; c < N; c++)
        hrow[r][c] = tap6(24'(win[r][c]), 24'(win[r][c+1]), 24'(win[r][c+2]),
                          24'(win[r][c+3]), 24'(win[r][c+4]), 24'(win[r][c+5]));
    for (int c = 0; c < N; c++) begin
      unique case ({fx, fy})
        2'b00: pred[c] = win[2][c+2];
        2'b10: pred[c] = clip8((hrow[2][c] + 24'sd16) >>> 5);
        2'b01: pred[c] = clip8((tap6(24'(win[0][c+2]), 24'(win[1][c+2]), 24'(win[2][c+2]),
                                     24'(win[3][c+2]), 24'(win[4][c+2]), 24'(win[5][c+2]))
                                + 24'sd16) >>> 5);
        default: pred[c] = clip8((tap6(hrow[0][c], hrow[1][c], hrow[2][c],
                                       hrow[3][c], hrow[4][c], hrow[5][c]) + 24'sd512) >>> 10);
      endcase
    end
  end
endmodule

// sad_tree: sum of absolute differences of one IME candidate.
//
// Takes ROWS x COLS current pixels and the co-located reference pixels of one
// candidate and returns the sum of their absolute differences, as an adder
// tree of ROWS*COLS absolute-difference units. Purely combinational.
// The IME uses eight of these trees side by side (eight candidates at a time)
// and feeds each half an MB (16x8) per cycle, so one full-MB SAD takes two
// cycles; the split into halves is this design's choice, made so that the
// 64x32 search takes the 512 cycles of the published case study.
module sad_tree
  import fp_pkg::*;
#(
  parameter int unsigned ROWS = IME_ROWS,
  parameter int unsigned COLS = MB,
  localparam int unsigned SW  = 8 + $clog2(ROWS*COLS)
) (
  input  pix_t              cur [ROWS][COLS],
  input  pix_t              refp[ROWS][COLS],
  output logic [SW-1:0]     sad
);
  logic [7:0]    ad   [ROWS][COLS];
  logic [SW-1:0] rsum [ROWS];

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      rsum[r] = '0;
      for (int c = 0; c < COLS; c++) begin
        ad[r][c] = (cur[r][c] > refp[r][c]) ? cur[r][c] - refp[r][c] : refp[r][c] - cur[r][c];
        rsum[r]  = rsum[r] + SW'(ad[r][c]);
      end
    end
    sad = '0;
    for (int r = 0; r < ROWS; r++) sad = sad + rsum[r];
  end
endmodule

// ime_search: full-search integer motion estimation of one current MB in one
// reference SR window.
//
// Candidates cover RX horizontal x RY vertical integer positions centred on
// the MB (mv.x in [-RX/2, RX/2-1], mv.y in [-RY/2, RY/2-1]); 64x32 by default
// as in the published case study. PAR horizontally adjacent candidates are
// evaluated together by PAR sad_tree instances, each taking half an MB (ROWS
// rows) per cycle, so a group of PAR candidates takes MB/ROWS cycles and the
// whole search RX*RY/PAR*MB/ROWS cycles (512 by default). The cost is the
// plain 16x16 SAD (no motion-vector rate term; own choice) and, among equal
// costs, the candidate met first in raster order wins.
//
// Timing: `start` for one cycle; `busy` is then high for exactly the search
// cycles, and `done` pulses in the cycle after the last one with best_mv and
// best_sad valid (held until the next start). The SR window is read through
// the IME port of an sr_bank: win_row/win_col give the logical top-left of
// the ROWS x (MB+PAR-1) window needed in the present cycle.
module ime_search
  import fp_pkg::*;
#(
  parameter int unsigned RX   = IME_RX,
  parameter int unsigned RY   = IME_RY,
  parameter int unsigned PAR  = IME_PAR,
  parameter int unsigned ROWS = IME_ROWS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  pix_t               cur [MB][MB],
  output logic [7:0]         win_row,
  output logic [7:0]         win_col,
  input  pix_t               win [ROWS][MB+PAR-1],
  output logic               busy,
  output logic               done,
  output logic signed [7:0]  best_x,
  output logic signed [7:0]  best_y,
  output logic [15:0]        best_sad
);
  localparam int unsigned NG = RX / PAR;      // candidate groups per row
  localparam int unsigned NH = MB / ROWS;     // passes per candidate
  localparam int unsigned SW = 8 + $clog2(ROWS*MB);

  logic [7:0]  vy;     // vertical candidate index
  logic [7:0]  g;      // group index
  logic [3:0]  h;      // MB part (rows h*ROWS ...)
  logic [15:0] acc [PAR];

  pix_t          cur_part [ROWS][MB];
  pix_t          ref_part [PAR][ROWS][MB];
  logic [SW-1:0] psad     [PAR];

  always_comb begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < MB; c++) begin
        cur_part[r][c] = cur[int'(h)*ROWS + r][c];
        for (int k = 0; k < PAR; k++) ref_part[k][r][c] = win[r][c + k];
      end
  end

  for (genvar k = 0; k < PAR; k++) begin : g_tree
    sad_tree #(.ROWS(ROWS), .COLS(MB)) u_tree (.cur(cur_part), .refp(ref_part[k]), .sad(psad[k]));
  end

  assign win_row = 8'(MB_Y0 - RY/2 + int'(vy) + int'(h)*ROWS);
  assign win_col = 8'(MB_X0 - RX/2 + int'(g)*PAR);

  // best of the present group, first one on ties
  logic [15:0] tot [PAR];
  logic [15:0] gbest;
  int unsigned gk;
  always_comb begin
    gbest = 16'hFFFF;
    gk    = 0;
    for (int k = 0; k < PAR; k++) begin
      tot[k] = acc[k] + 16'(psad[k]);
      if (tot[k] < gbest) begin
        gbest = tot[k];
        gk    = k;
      end
    end
  end

  wire last_h = (h == 4'(NH-1));
  wire last   = last_h && (g == 8'(NG-1)) && (vy == 8'(RY-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; vy <= '0; g <= '0; h <= '0;
      best_x <= '0; best_y <= '0; best_sad <= 16'hFFFF;
      for (int k = 0; k < PAR; k++) acc[k] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1; vy <= '0; g <= '0; h <= '0;
        best_sad <= 16'hFFFF;
        for (int k = 0; k < PAR; k++) acc[k] <= '0;
      end else if (busy) begin
        if (!last_h) begin
          for (int k = 0; k < PAR; k++) acc[k] <= tot[k];
          h <= h + 1'b1;
        end else begin
          for (int k = 0; k < PAR; k++) acc[k] <= '0;
          h <= '0;
          if (gbest < best_sad) begin
            best_sad <= gbest;
            best_x   <= 8'(int'(g)*PAR + gk) - 8'(RX/2);
            best_y   <= 8'(vy) - 8'(RY/2);
          end
          if (g == 8'(NG-1)) begin
            g  <= '0;
            vy <= vy + 1'b1;
          end else g <= g + 1'b1;
          if (last) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end
endmodule

// parallel_ime: integer motion estimation for the three co-located MBs
// (B0, B1, P) of one MB position, one current MB at a time (Fig. 4,
// proposed schedule).
//
// The six searches run in the order B0 forward, B1 forward, P ref 0 (all on
// reference 0), then B0 backward, B1 backward, P ref 1 (reference 1). A search
// starts as soon as the SR data of its reference are loaded
// (`ref_loaded`), so the three reference-0 searches overlap the loading of
// reference 1. With 320 load cycles per reference and 512 cycles per search
// the stage takes 320 + 6*512 = 3392 cycles plus a few cycles of hand-over,
// the proposed figure of the published case study.
//
// Interface: `start` pulses at the beginning of an MB stage, `cur` holds the
// three current MBs for the whole stage (index = frame_e). `done` pulses when
// all six results are in `imv_x/imv_y/imv_sad[frame][ref]`, which are held
// until the next start. The SR windows of both references are read through
// their IME ports; `win_row/win_col` go to both, `win0/win1` come back.
module parallel_ime
  import fp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [1:0]         ref_loaded,
  input  pix_t               cur [3][MB][MB],
  output logic [7:0]         win_row,
  output logic [7:0]         win_col,
  input  pix_t               win0 [IME_ROWS][MB+IME_PAR-1],
  input  pix_t               win1 [IME_ROWS][MB+IME_PAR-1],
  output logic               busy,
  output logic               done,
  output logic signed [7:0]  imv_x   [3][2],
  output logic signed [7:0]  imv_y   [3][2],
  output logic [15:0]        imv_sad [3][2]
);
  // job j: frame = j % 3, reference = j / 3 (Fig. 4 order)
  logic [2:0] job;
  logic       running;
  logic       s_start, s_busy, s_done;
  logic signed [7:0] s_x, s_y;
  logic [15:0] s_sad;
  frame_e     jf;
  logic       jr;
  pix_t       win [IME_ROWS][MB+IME_PAR-1];

  always_comb begin
    jf  = frame_e'(2'(job % 3));
    jr  = (job >= 3'd3);
    win = jr ? win1 : win0;
  end

  assign s_start = busy && !running && !s_done && (job < 3'd6) && ref_loaded[jr];

  ime_search u_search (
    .clk, .rst_n, .start(s_start), .cur(cur[jf]),
    .win_row, .win_col, .win,
    .busy(s_busy), .done(s_done), .best_x(s_x), .best_y(s_y), .best_sad(s_sad)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      job <= '0; running <= 1'b0; busy <= 1'b0; done <= 1'b0;
      for (int f = 0; f < 3; f++)
        for (int r = 0; r < 2; r++) begin
          imv_x[f][r] <= '0; imv_y[f][r] <= '0; imv_sad[f][r] <= '0;
        end
    end else begin
      done <= 1'b0;
      if (start) begin
        job <= '0; running <= 1'b0; busy <= 1'b1;
      end else if (busy) begin
        if (s_start) running <= 1'b1;
        if (s_done) begin
          imv_x[jf][jr]   <= s_x;
          imv_y[jf][jr]   <= s_y;
          imv_sad[jf][jr] <= s_sad;
          running         <= 1'b0;
          job             <= job + 1'b1;
          if (job == 3'd5) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  // a search must never start on a reference that is not loaded yet
  a_ref_ready: assert property (@(posedge clk) disable iff (!rst_n) s_start |-> ref_loaded[jr]);

endmodule

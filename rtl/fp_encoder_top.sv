// fp_encoder_top: frame-parallel motion estimation core of an IBBP H.264
// encoder (Fig. 3).
//
// The two B frames and the P frame between two reference frames do not
// depend on each other, so their MBs at the same position are encoded
// together. Search-range data of reference 0 and reference 1 are loaded once
// over the shared system bus into the SR data memory (two sr_bank SRAMs) and
// used by all three MBs, which cuts the SR bandwidth to a third of encoding
// the frames one after the other. The parallel IME (B0, B1, P) and the
// parallel FME (B0, B1, P) share that memory; IME works on MB position n+1
// while FME works on position n. The FME's decision for each frame (mode,
// per-8x8 direction and vectors) goes out on res_dec[frame], towards that
// frame's residual coding processor, which lies outside this core.
//
// Ports
//   cmd_*     : one MB position: three current MBs (index fp_pkg::frame_e),
//               MB coordinates and a first-of-row flag; valid/ready.
//   bus_*     : 32-bit SR read bus (see sr_loader): request/grant, in-order
//               single-cycle responses.
//   mvp       : motion-vector predictor per frame and reference (quarter-pel)
//               used in the rate term; lambda: Lagrange multiplier.
//   res_*     : per MB position, res_valid pulses with the decisions of the
//               three frames.
//   status    : ref_loaded, pe_active and stage_both show the SR loading, the
//               PE array and the overlap of IME and FME stages.
// Timing of one stage at default sizes: IME 320 load cycles + 6 searches of
// 512 cycles (plus 2 hand-over cycles per search); FME 4 slots of 292 cycles
// plus 3 decision cycles; the stage lasts as long as the longer of the two.
module fp_encoder_top
  import fp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // MB commands
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  logic               cmd_first,
  input  logic signed [11:0] cmd_mb_x,
  input  logic signed [11:0] cmd_mb_y,
  input  pix_t               cmd_pix [3][MB][MB],
  input  mv_t                mvp [3][2],
  input  logic [7:0]         lambda,
  // system bus
  output logic               bus_req,
  output logic               bus_ref,
  output logic signed [15:0] bus_x,
  output logic signed [15:0] bus_y,
  input  logic               bus_gnt,
  input  logic               bus_rvalid,
  input  logic [31:0]        bus_rdata,
  // to the three residual coders
  output logic               res_valid,
  output logic signed [11:0] res_mb_x,
  output logic signed [11:0] res_mb_y,
  output mb_dec_t            res_dec [3],
  // status
  output logic [1:0]         ref_loaded,
  output logic               pe_active,
  output logic               stage_both
);
  // controller <-> units
  logic               ld_start, ld_full, ld_busy;
  logic signed [11:0] ld_mb_x, ld_mb_y;
  logic [7:0]         ime_base, fme_base;
  logic               ime_start, ime_done, ime_busy;
  logic               fme_start, fme_done, fme_busy;
  pix_t               ime_cur [3][MB][MB];
  pix_t               fme_cur [3][MB][MB];
  logic signed [7:0]  ime_x [3][2], ime_y [3][2], fme_x [3][2], fme_y [3][2];
  logic [15:0]        ime_sad [3][2];

  // SR memory
  logic [1:0]  sr_we;
  logic [7:0]  sr_wrow, sr_wcol;
  logic [31:0] sr_wdata;
  logic [7:0]  ime_row, ime_col;
  pix_t        ime_win [2][IME_ROWS][MB+IME_PAR-1];
  logic [7:0]  fme_row [2], fme_col [2];
  pix_t        fme_win [2][6][FME_PIX+5];

  fp_controller u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_first, .cmd_mb_x, .cmd_mb_y, .cmd_pix,
    .ld_start, .ld_full, .ld_mb_x, .ld_mb_y, .ime_base, .ld_busy,
    .ime_start, .ime_cur, .ime_done, .ime_x, .ime_y,
    .fme_start, .fme_cur, .fme_x, .fme_y, .fme_base, .fme_done,
    .res_valid, .res_mb_x, .res_mb_y, .stage_both
  );

  sr_loader u_loader (
    .clk, .rst_n, .start(ld_start), .full(ld_full), .mb_x(ld_mb_x), .mb_y(ld_mb_y),
    .win_base(ime_base), .ref_loaded, .busy(ld_busy),
    .bus_req, .bus_ref, .bus_x, .bus_y, .bus_gnt, .bus_rvalid, .bus_rdata,
    .sr_we, .sr_row(sr_wrow), .sr_col(sr_wcol), .sr_data(sr_wdata)
  );

  for (genvar b = 0; b < 2; b++) begin : g_bank
    sr_bank u_bank (
      .clk, .we(sr_we[b]), .wr_row(sr_wrow), .wr_col(sr_wcol), .wr_data(sr_wdata),
      .ime_base, .ime_row, .ime_col, .ime_win(ime_win[b]),
      .fme_base, .fme_row(fme_row[b]), .fme_col(fme_col[b]), .fme_win(fme_win[b])
    );
  end

  parallel_ime u_ime (
    .clk, .rst_n, .start(ime_start), .ref_loaded, .cur(ime_cur),
    .win_row(ime_row), .win_col(ime_col), .win0(ime_win[0]), .win1(ime_win[1]),
    .busy(ime_busy), .done(ime_done), .imv_x(ime_x), .imv_y(ime_y), .imv_sad(ime_sad)
  );

  parallel_fme u_fme (
    .clk, .rst_n, .start(fme_start), .cur(fme_cur), .imv_x(fme_x), .imv_y(fme_y),
    .mvp, .lambda, .sr_row(fme_row), .sr_col(fme_col), .sr_win(fme_win),
    .busy(fme_busy), .done(fme_done), .dec(res_dec), .pe_active
  );

endmodule

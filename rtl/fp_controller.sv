// fp_controller: MB-pipeline control of the frame-parallel encoder core.
//
// One command carries the three co-located current MBs (B0, B1, P) of one MB
// position. The core is a two-stage MB pipeline: in each stage the IME (with
// the SR loading of its MB) works on MB position n+1 while the FME works on
// MB position n; the stage ends when every unit started in it has finished.
// The controller keeps the double buffers this needs (current MBs, integer
// MVs, SR window origin) and passes each MB from the IME to the FME stage.
//
// Level C window origin: the first MB of an MB row (`mb_first`) gets window
// origin 0 and a full window load; each further MB moves the origin 16
// columns on (modulo the SR width). The FME of the last MB of a row is run in
// a stage of its own before the first MB of the next row is loaded, because
// a full window load would overwrite the data that FME still reads. The same
// happens whenever no new command is waiting when a stage ends.
//
// Handshake: a command is taken when cmd_valid && cmd_ready. For each MB,
// res_valid pulses once with res_mb_x/y; the FME's decisions are valid in the
// same cycle. All start outputs are single-cycle pulses.
module fp_controller
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
  // SR loader
  output logic               ld_start,
  output logic               ld_full,
  output logic signed [11:0] ld_mb_x,
  output logic signed [11:0] ld_mb_y,
  output logic [7:0]         ime_base,
  input  logic               ld_busy,
  // IME
  output logic               ime_start,
  output pix_t               ime_cur [3][MB][MB],
  input  logic               ime_done,
  input  logic signed [7:0]  ime_x [3][2],
  input  logic signed [7:0]  ime_y [3][2],
  // FME
  output logic               fme_start,
  output pix_t               fme_cur [3][MB][MB],
  output logic signed [7:0]  fme_x [3][2],
  output logic signed [7:0]  fme_y [3][2],
  output logic [7:0]         fme_base,
  input  logic               fme_done,
  // results
  output logic               res_valid,
  output logic signed [11:0] res_mb_x,
  output logic signed [11:0] res_mb_y,
  // status
  output logic               stage_both     // present stage runs IME and FME together
);
  logic       in_stage, ime_pend, fme_pend, run_ime, run_fme, have_fme;
  logic signed [11:0] ime_mx, ime_my;

  // decide the next stage
  logic go, go_ime, go_fme;
  always_comb begin
    go_fme = have_fme;
    go_ime = cmd_valid && !(have_fme && cmd_first);
    go     = !in_stage && (go_fme || go_ime);
  end
  assign cmd_ready = go && go_ime;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_stage <= 1'b0; ime_pend <= 1'b0; fme_pend <= 1'b0; run_ime <= 1'b0; run_fme <= 1'b0;
      have_fme <= 1'b0; ld_start <= 1'b0; ld_full <= 1'b0; ld_mb_x <= '0; ld_mb_y <= '0;
      ime_base <= '0; fme_base <= '0; ime_start <= 1'b0; fme_start <= 1'b0;
      res_valid <= 1'b0; res_mb_x <= '0; res_mb_y <= '0; ime_mx <= '0; ime_my <= '0;
      stage_both <= 1'b0;
      for (int f = 0; f < 3; f++) begin
        for (int r = 0; r < 2; r++) begin
          fme_x[f][r] <= '0; fme_y[f][r] <= '0;
        end
        for (int y = 0; y < MB; y++)
          for (int x = 0; x < MB; x++) begin
            ime_cur[f][y][x] <= '0; fme_cur[f][y][x] <= '0;
          end
      end
    end else begin
      ld_start  <= 1'b0;
      ime_start <= 1'b0;
      fme_start <= 1'b0;
      res_valid <= 1'b0;
      if (go) begin
        in_stage   <= 1'b1;
        run_ime    <= go_ime;
        run_fme    <= go_fme;
        stage_both <= go_ime && go_fme;
        if (go_fme) begin
          // hand the IME's MB to the FME stage
          fme_cur   <= ime_cur;
          fme_x     <= ime_x;
          fme_y     <= ime_y;
          fme_base  <= ime_base;
          res_mb_x  <= ime_mx;
          res_mb_y  <= ime_my;
          fme_start <= 1'b1;
          fme_pend  <= 1'b1;
        end
        if (go_ime) begin
          ime_cur   <= cmd_pix;
          ime_mx    <= cmd_mb_x;
          ime_my    <= cmd_mb_y;
          ime_base  <= cmd_first ? 8'd0 : 8'((int'(ime_base) + MB) % SR_COLS);
          ld_full   <= cmd_first;
          ld_mb_x   <= cmd_mb_x;
          ld_mb_y   <= cmd_mb_y;
          ld_start  <= 1'b1;
          ime_start <= 1'b1;
          ime_pend  <= 1'b1;
        end
        have_fme <= go_ime;
      end else if (in_stage) begin
        if (ime_done) ime_pend <= 1'b0;
        if (fme_done) fme_pend <= 1'b0;
        if (!ime_pend && !fme_pend && !ld_busy && !ld_start && !ime_start && !fme_start) begin
          in_stage <= 1'b0;
          if (run_fme) res_valid <= 1'b1;
        end
      end
    end
  end

  a_stage_units: assert property (@(posedge clk) disable iff (!rst_n) go |-> (go_ime || go_fme));

endmodule

// parallel_fme: fractional motion estimation of the three co-located MBs with
// two interleaved interpolation filters and one shared Hadamard PE array
// (Fig. 5), following the operation schedule of Fig. 6.
//
// How it works
//   * Two lanes. Lane L owns 6-tap interpolation filter L; a MUX in front of
//     each filter selects the Ref 0 or Ref 1 SR SRAM. In every slot the two
//     lanes run one operation each (fp_pkg::fme_sched), always on different
//     SRAMs, so the two filters never contend for a memory port:
//        slot 0: B0 forward        | P  ref 1
//        slot 1: B0 bi-directional | B0 backward
//        slot 2: P  ref 0          | B1 backward
//        slot 3: B1 forward        | B1 bi-directional
//   * A uni-directional operation refines the integer MV of the IME to
//     half-pel accuracy: 9 candidates (the integer position and its 8
//     half-pel neighbours) for the 16x16 MB, one 16-pixel row per
//     candidate and row. Each filter makes 8 pixels per cycle, so a row takes
//     2 cycles and an operation 9*16*2 = 288 cycles.
//   * A bi-directional operation runs next to the uni-directional operation of
//     the other direction of the same B frame. Its filter re-creates the
//     best 16x16 prediction of its own direction found in the previous slot;
//     that row is held in the stage register ("Register" of Fig. 5) and
//     averaged with each candidate row of the other lane, which refines the
//     other direction's vector with this one fixed (one iteration of
//     bi-directional refinement).
//   * Both lanes finish a row in the same cycle; the PE array then takes the
//     lane-0 residual row in the next cycle and the lane-1 row in the one
//     after, while the filters produce the next rows. The four Hadamard PEs
//     (one per 4-pixel column) are thus fed on every cycle of an operation.
//   * Per candidate the 4x4 SATDs are summed into the four 8x8 quadrants,
//     giving the SATD of all nine partitions (16x16, 16x8, 8x16, 8x8) at once.
//     J = SATD + lambda*R(mvd) (mv_cost_gen) is compared per partition and the
//     best candidate kept. After the four slots the Lagrangian mode decision
//     chooses direction and partition mode of each frame, one frame per cycle.
//
// Interface: `start` pulses once `cur`, `imv_*` and `mvp` are stable; they
// must stay so until `done`, which pulses with `dec[frame]` valid (held until
// the next start). `pe_active` is high in every cycle the PE array is fed.
// Half-pel only (no quarter-pel step), one vector per direction refined on
// the 16x16 block and shared by its partitions' candidate set, and no
// direct/skip candidate: these simplifications are this design's, see the
// documentation.
module parallel_fme
  import fp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  pix_t               cur   [3][MB][MB],
  input  logic signed [7:0]  imv_x [3][2],
  input  logic signed [7:0]  imv_y [3][2],
  input  mv_t                mvp   [3][2],
  input  logic [7:0]         lambda,
  // FME read ports of the two SR banks (index = reference)
  output logic [7:0]         sr_row [2],
  output logic [7:0]         sr_col [2],
  input  pix_t               sr_win [2][6][FME_PIX+5],
  output logic               busy,
  output logic               done,
  output mb_dec_t            dec [3],
  output logic               pe_active
);
  typedef enum logic [2:0] {S_IDLE, S_RUN, S_DRAIN, S_SAVE, S_MD} st_e;
  st_e st;

  logic [1:0] slot;
  logic [3:0] cand, row;
  logic       hf;
  logic [1:0] drain;
  logic [1:0] md_f;

  part_res_t  res  [3][3][N_PART];   // [frame][dir][partition]
  part_res_t  best [2][N_PART];      // per lane, current slot

  fme_op_t op [2];
  always_comb begin
    op[0] = fme_sched(int'(slot), 0);
    op[1] = fme_sched(int'(slot), 1);
  end

  // ---- vector of a lane for a candidate ------------------------------------
  // UNI: integer MV (x4) plus the half-pel offset of candidate c.
  // BI : the best 16x16 vector of its own direction from an earlier slot.
  function automatic mv_t lane_mv(input fme_op_t o, input logic [3:0] c);
    mv_t m;
    if (o.kind == OP_BI) begin
      m = o.ref_sel ? res[o.frame][DIR_L1][0].mv1 : res[o.frame][DIR_L0][0].mv0;
    end else begin
      m.x = 10'(imv_x[o.frame][o.ref_sel]) * 10'sd4 + 10'sd2 * (10'(c % 3) - 10'sd1);
      m.y = 10'(imv_y[o.frame][o.ref_sel]) * 10'sd4 + 10'sd2 * (10'(c / 3) - 10'sd1);
    end
    return m;
  endfunction

  // ---- filters with their SRAM MUXes ------------------------------------------
  mv_t  fmv [2];
  pix_t fwin [2][6][FME_PIX+5];
  pix_t fpred [2][FME_PIX];
  logic signed [9:0] hpx [2], hpy [2];

  for (genvar l = 0; l < 2; l++) begin : g_lane
    always_comb begin
      fmv[l]  = lane_mv(op[l], cand);
      hpx[l]  = fmv[l].x >>> 1;              // half-pel units
      hpy[l]  = fmv[l].y >>> 1;
      fwin[l] = sr_win[op[l].ref_sel];       // SRAM MUX in front of filter l
    end
    interp_6tap u_filt (.win(fwin[l]), .fx(hpx[l][0]), .fy(hpy[l][0]), .pred(fpred[l]));
  end

  // each SRAM's FME port is addressed by the lane that the schedule gives it
  always_comb begin
    for (int b = 0; b < 2; b++) begin
      int l;
      l = (op[0].ref_sel == 1'(b)) ? 0 : 1;
      sr_row[b] = 8'(int'(MB_Y0) + int'(row) + int'(hpy[l] >>> 1) - 2);
      sr_col[b] = 8'(int'(MB_X0) + int'(hf) * FME_PIX + int'(hpx[l] >>> 1) - 2);
    end
  end

  // ---- row assembly and stage register ----------------------------------------
  pix_t       rowbuf [2][FME_PIX];
  pix_t       stage  [2][MB];
  logic       stage_v, stage_ph;
  logic [3:0] stage_c, stage_r;

  // ---- PE array -----------------------------------------------------------------
  logic signed [8:0] pres [N_HPE][4];
  pix_t              pr   [MB];
  frame_e            pf;
  logic              pe_ov   [N_HPE];
  logic              pe_ol   [N_HPE];
  logic [15:0]       pe_satd [N_HPE];
  logic [3:0]        pe_c, pe_r;

  always_comb begin
    pf = op[stage_ph].frame;
    for (int x = 0; x < MB; x++) begin
      if (op[stage_ph].kind == OP_BI)
        pr[x] = pix_t'((9'(stage[0][x]) + 9'(stage[1][x]) + 9'd1) >> 1);
      else
        pr[x] = stage[stage_ph][x];
    end
    for (int i = 0; i < N_HPE; i++)
      for (int k = 0; k < 4; k++)
        pres[i][k] = 9'(cur[pf][stage_r][4*i+k]) - 9'(pr[4*i+k]);
  end

  assign pe_active = stage_v;

  for (genvar i = 0; i < N_HPE; i++) begin : g_pe
    hadamard_pe u_pe (
      .clk, .rst_n, .in_valid(stage_v), .in_lane(stage_ph), .in_row(stage_r[1:0]),
      .in_res(pres[i]), .out_valid(pe_ov[i]), .out_lane(pe_ol[i]), .out_satd(pe_satd[i])
    );
  end

  // ---- candidate evaluation -------------------------------------------------------
  logic [19:0] qacc [2][4];
  logic [19:0] qtot [4];
  logic        el;                 // lane of the PE output
  fme_op_t     eop, oop;
  mv_t         emv, omv, mvp_e, mvp_o;
  cost_t       mvc_e, mvc_o, mvc;
  logic [21:0] pcost [N_PART];
  logic        last_blk;

  assign el       = pe_ol[0];
  assign last_blk = pe_ov[0] && (pe_r[3:2] == 2'd3);

  always_comb begin
    eop   = op[el];
    oop   = op[!el];
    emv   = lane_mv(eop, pe_c);
    omv   = lane_mv(oop, pe_c);
    mvp_e = mvp[eop.frame][eop.ref_sel];
    mvp_o = mvp[eop.frame][oop.ref_sel];
    for (int q = 0; q < 4; q++) qtot[q] = qacc[el][q];
    if (pe_ov[0]) begin
      qtot[2*pe_r[3]]     = qtot[2*pe_r[3]]     + 20'(pe_satd[0]) + 20'(pe_satd[1]);
      qtot[2*pe_r[3] + 1] = qtot[2*pe_r[3] + 1] + 20'(pe_satd[2]) + 20'(pe_satd[3]);
    end
  end

  mv_cost_gen u_mvc_e (.mv(emv), .mvp(mvp_e), .lambda, .cost(mvc_e));
  mv_cost_gen u_mvc_o (.mv(omv), .mvp(mvp_o), .lambda, .cost(mvc_o));

  always_comb begin
    mvc = (eop.kind == OP_BI) ? mvc_e + mvc_o : mvc_e;
    pcost[0] = 22'(qtot[0]) + 22'(qtot[1]) + 22'(qtot[2]) + 22'(qtot[3]) + 22'(mvc);
    pcost[1] = 22'(qtot[0]) + 22'(qtot[1]) + 22'(mvc);
    pcost[2] = 22'(qtot[2]) + 22'(qtot[3]) + 22'(mvc);
    pcost[3] = 22'(qtot[0]) + 22'(qtot[2]) + 22'(mvc);
    pcost[4] = 22'(qtot[1]) + 22'(qtot[3]) + 22'(mvc);
    for (int q = 0; q < 4; q++) pcost[5+q] = 22'(qtot[q]) + 22'(mvc);
  end

  // candidate result in (mv0, mv1) form
  function automatic part_res_t mk_res(input logic [21:0] c, input fme_op_t o,
                                       input mv_t own, input mv_t other);
    part_res_t r;
    r.cost = (c > 22'(cost_t'('1))) ? cost_t'('1) : cost_t'(c);
    r.mv0  = '0;
    r.mv1  = '0;
    if (o.ref_sel) r.mv1 = own; else r.mv0 = own;
    if (o.kind == OP_BI) begin
      if (o.ref_sel) r.mv0 = other; else r.mv1 = other;
    end
    return r;
  endfunction

  // ---- Lagrangian mode decision, time-shared over the frames ----------------
  mb_dec_t md_dec;
  lagrangian_md u_md (.res(res[md_f]), .lambda, .dec(md_dec));

  wire last_step = (cand == 4'(N_CAND-1)) && (row == 4'(MB-1)) && hf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; slot <= '0; cand <= '0; row <= '0; hf <= 1'b0; drain <= '0; md_f <= '0;
      busy <= 1'b0; done <= 1'b0;
      stage_v <= 1'b0; stage_ph <= 1'b0; stage_c <= '0; stage_r <= '0;
      pe_c <= '0; pe_r <= '0;
      for (int l = 0; l < 2; l++) begin
        for (int x = 0; x < FME_PIX; x++) rowbuf[l][x] <= '0;
        for (int x = 0; x < MB; x++) stage[l][x] <= '0;
        for (int q = 0; q < 4; q++) qacc[l][q] <= '0;
        for (int p = 0; p < N_PART; p++) best[l][p] <= '{cost: '1, mv0: '0, mv1: '0};
      end
      for (int f = 0; f < 3; f++) begin
        dec[f] <= '0;
        for (int d = 0; d < 3; d++)
          for (int p = 0; p < N_PART; p++) res[f][d][p] <= '{cost: '1, mv0: '0, mv1: '0};
      end
    end else begin
      done <= 1'b0;

      // filters: one half row per lane per cycle
      if (st == S_RUN) begin
        for (int l = 0; l < 2; l++) begin
          if (!hf) rowbuf[l] <= fpred[l];
          else begin
            for (int x = 0; x < FME_PIX; x++) begin
              stage[l][x]           <= rowbuf[l][x];
              stage[l][FME_PIX + x] <= fpred[l][x];
            end
          end
        end
        hf <= !hf;
        if (hf) begin
          row <= row + 1'b1;
          if (row == 4'(MB-1)) cand <= cand + 1'b1;
        end
      end

      // stage register: lane 0 then lane 1 into the PE array
      if (st == S_RUN && hf) begin
        stage_v  <= 1'b1;
        stage_ph <= 1'b0;
        stage_c  <= cand;
        stage_r  <= row;
      end else if (stage_v && !stage_ph) begin
        stage_ph <= 1'b1;
      end else begin
        stage_v  <= 1'b0;
        stage_ph <= 1'b0;
      end
      pe_c <= stage_c;
      pe_r <= stage_r;

      // quadrant accumulation and per-partition best
      if (pe_ov[0]) begin
        if (last_blk) begin
          for (int q = 0; q < 4; q++) qacc[el][q] <= '0;
          for (int p = 0; p < N_PART; p++)
            if (22'(pcost[p]) < 22'(best[el][p].cost))
              best[el][p] <= mk_res(pcost[p], eop, emv, omv);
        end else begin
          for (int q = 0; q < 4; q++) qacc[el][q] <= qtot[q];
        end
      end

      unique case (st)
        S_IDLE: if (start) begin
          st <= S_RUN; busy <= 1'b1; slot <= '0; cand <= '0; row <= '0; hf <= 1'b0;
          for (int f = 0; f < 3; f++)
            for (int d = 0; d < 3; d++)
              for (int p = 0; p < N_PART; p++) res[f][d][p] <= '{cost: '1, mv0: '0, mv1: '0};
          for (int l = 0; l < 2; l++)
            for (int p = 0; p < N_PART; p++) best[l][p] <= '{cost: '1, mv0: '0, mv1: '0};
        end
        S_RUN: if (last_step) begin
          st <= S_DRAIN; drain <= '0;
        end
        S_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 2'd2) st <= S_SAVE;
        end
        S_SAVE: begin
          for (int l = 0; l < 2; l++)
            for (int p = 0; p < N_PART; p++) begin
              res[op[l].frame][(op[l].kind == OP_BI) ? DIR_BI : dir_e'(op[l].ref_sel)][p] <= best[l][p];
              best[l][p] <= '{cost: '1, mv0: '0, mv1: '0};
            end
          cand <= '0; row <= '0; hf <= 1'b0;
          if (slot == 2'(N_SLOT-1)) begin
            st <= S_MD; md_f <= '0;
          end else begin
            slot <= slot + 1'b1;
            st   <= S_RUN;
          end
        end
        S_MD: begin
          dec[md_f] <= md_dec;
          md_f      <= md_f + 1'b1;
          if (md_f == 2'd2) begin
            st <= S_IDLE; busy <= 1'b0; done <= 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // the two filters must never read the same SR SRAM (Fig. 6 schedule)
  a_no_sram_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_RUN) |-> (op[0].ref_sel != op[1].ref_sel));
  // a bi-directional lane is always paired with a uni-directional one of the same frame
  a_bi_pair: assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_RUN && (op[0].kind == OP_BI || op[1].kind == OP_BI))
      |-> (op[0].frame == op[1].frame && op[0].kind != op[1].kind));

endmodule

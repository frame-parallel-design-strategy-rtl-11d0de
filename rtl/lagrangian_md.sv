// lagrangian_md: Lagrangian mode decision of one MB.
//
// Inputs are, for each of the three directions (L0 / L1 / bi-directional)
// and each of the nine partitions (0: 16x16, 1-2: 16x8 top/bottom,
// 3-4: 8x16 left/right, 5-8: 8x8 blocks in raster order), the best FME result
// J = SATD + lambda*R(mv) with its vectors. The unit first picks, per
// partition, the direction of lowest J (L0 before L1 before bi on ties), then
// adds the partitions of each mode plus the mode rate from mode_cost_gen and
// picks the mode of lowest total (16x16 first on ties). A direction that was
// not searched (bi for the P frame) carries the all-ones cost. Combinational;
// the FME time-shares one instance over the three frames. The source names
// this unit; the exact cost sums and tie rules are this design's choice.
module lagrangian_md
  import fp_pkg::*;
(
  input  part_res_t  res [3][N_PART],
  input  logic [7:0] lambda,
  output mb_dec_t    dec
);
  part_res_t   best [N_PART];
  dir_e        bdir [N_PART];
  cost_t       mc   [4];
  logic [23:0] jm   [4];

  for (genvar m = 0; m < 4; m++) begin : g_mc
    mode_cost_gen u_mc (.mode(mode_e'(m)), .lambda, .cost(mc[m]));
  end

  function automatic quad_dec_t qd(input part_res_t p, input dir_e d);
    quad_dec_t q;
    q.dir = d;
    q.mv0 = p.mv0;
    q.mv1 = p.mv1;
    return q;
  endfunction

  always_comb begin
    for (int p = 0; p < N_PART; p++) begin
      best[p] = res[0][p];
      bdir[p] = DIR_L0;
      for (int d = 1; d < 3; d++)
        if (res[d][p].cost < best[p].cost) begin
          best[p] = res[d][p];
          bdir[p] = dir_e'(d);
        end
    end
    jm[0] = 24'(best[0].cost) + 24'(mc[0]);
    jm[1] = 24'(best[1].cost) + 24'(best[2].cost) + 24'(mc[1]);
    jm[2] = 24'(best[3].cost) + 24'(best[4].cost) + 24'(mc[2]);
    jm[3] = 24'(best[5].cost) + 24'(best[6].cost) + 24'(best[7].cost)
          + 24'(best[8].cost) + 24'(mc[3]);

    dec.mode = M16X16;
    for (int m = 1; m < 4; m++)
      if (jm[m] < jm[dec.mode]) dec.mode = mode_e'(m);
    dec.cost = (jm[dec.mode] > 24'(cost_t'('1))) ? cost_t'('1) : cost_t'(jm[dec.mode]);

    for (int q = 0; q < 4; q++) begin
      unique case (dec.mode)
        M16X16:  dec.quad[q] = qd(best[0], bdir[0]);
        M16X8:   dec.quad[q] = qd(best[1 + q/2], bdir[1 + q/2]);
        M8X16:   dec.quad[q] = qd(best[3 + q%2], bdir[3 + q%2]);
        default: dec.quad[q] = qd(best[5 + q], bdir[5 + q]);
      endcase
    end
  end
endmodule

// mv_cost_gen: rate term of a motion vector for the Lagrangian cost.
//
// cost = lambda * (len(mvd.x) + len(mvd.y)), mvd = mv - mvp, where len(v) is
// the length in bits of the signed Exp-Golomb code se(v) with which H.264
// sends a motion-vector difference: code number k = 2v-1 for v > 0 and -2v
// otherwise, length 2*floor(log2(k+1)) + 1. Vectors are in quarter-pel
// units. Combinational. The source only names this generator; the bit-count
// model and the integer lambda are this design's choice.
module mv_cost_gen
  import fp_pkg::*;
(
  input  mv_t        mv,
  input  mv_t        mvp,
  input  logic [7:0] lambda,
  output cost_t      cost
);
  function automatic logic [4:0] se_len(input logic signed [10:0] v);
    logic [11:0] k;
    logic [4:0]  lg;
    k  = (v > 0) ? 12'(2*v - 1) : 12'(-2*v);
    lg = '0;
    for (int b = 0; b < 12; b++)
      if (((k + 12'd1) >> b) != 0) lg = 5'(b);
    return 5'(2*lg + 1);
  endfunction

  logic [5:0] bits;
  always_comb begin
    bits = 6'(se_len(11'(mv.x) - 11'(mvp.x))) + 6'(se_len(11'(mv.y) - 11'(mvp.y)));
    cost = cost_t'(lambda) * cost_t'(bits);
  end
endmodule

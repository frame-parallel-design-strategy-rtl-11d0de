// mode_cost_gen: rate term of an inter partition mode for the Lagrangian cost.
//
// cost = lambda * bits(mode), with the bits of the mb_type Exp-Golomb code of
// an H.264 P macroblock: 16x16 -> 1, 16x8 -> 3, 8x16 -> 3, and 8x8 -> 3 plus
// 1 bit of sub_mb_type for each of the four 8x8 blocks (7). The same table is
// used for B macroblocks. Combinational, one mode per call. The source only
// names this generator; the bit table is this design's choice.
module mode_cost_gen
  import fp_pkg::*;
(
  input  mode_e      mode,
  input  logic [7:0] lambda,
  output cost_t      cost
);
  logic [3:0] bits;
  always_comb begin
    unique case (mode)
      M16X16:  bits = 4'd1;
      M16X8:   bits = 4'd3;
      M8X16:   bits = 4'd3;
      default: bits = 4'd7;
    endcase
    cost = cost_t'(lambda) * cost_t'(bits);
  end
endmodule

// fp_pkg: shared constants and types of the frame-parallel IBBP motion
// estimation core.
//
// The core encodes the co-located macroblocks (MBs) of three frames at once:
// the two B frames B0, B1 and the P frame of an IBBP group. All three share one
// search-range (SR) memory holding a window of reference frame 0 and one of
// reference frame 1. The numbers below that come from the published case study
// (32-bit SR bus, 128x64 maximum SR, 64x32 IME range, 8 IME candidates per
// cycle) are marked as such; the rest are this design's own choices.
package fp_pkg;

  // ---- MB and search-range geometry ------------------------------------------
  localparam int unsigned MB        = 16;   // MB width and height (H.264)
  localparam int unsigned SR_MAX_H  = 128;  // maximum SR, horizontal (case study)
  localparam int unsigned SR_MAX_V  = 64;   // maximum SR, vertical (case study)
  // SR window: SR_MAX_H+MB columns in use plus one strip being refilled
  localparam int unsigned SR_COLS   = SR_MAX_H + 2*MB;   // 160
  localparam int unsigned SR_ROWS   = SR_MAX_V + MB;     // 80
  localparam int unsigned WIN_COLS  = SR_MAX_H + MB;     // 144 columns of one window
  // logical position of the current MB's top-left pixel inside its window
  localparam int unsigned MB_X0     = SR_MAX_H/2;        // 64
  localparam int unsigned MB_Y0     = SR_MAX_V/2;        // 32

  // ---- system bus -------------------------------------------------------------
  localparam int unsigned BUS_W     = 32;                // SR bus width (case study)
  localparam int unsigned PIX_PER_W = BUS_W/8;           // 4 pixels per bus word
  localparam int unsigned STRIP_WORDS = SR_ROWS*MB/PIX_PER_W; // 320 words per strip

  // ---- IME --------------------------------------------------------------------
  localparam int unsigned IME_RX    = 64;  // horizontal candidates (case study)
  localparam int unsigned IME_RY    = 32;  // vertical candidates (case study)
  localparam int unsigned IME_PAR   = 8;   // candidates per SAD-tree group (case study)
  localparam int unsigned IME_ROWS  = 8;   // MB rows per SAD-tree pass (own choice)

  // ---- FME --------------------------------------------------------------------
  localparam int unsigned FME_PIX   = 8;   // interpolated pixels per filter per cycle
  localparam int unsigned N_HPE     = MB/4;// Hadamard PEs (one per 4-pixel column)
  localparam int unsigned N_CAND    = 9;   // half-pel candidates: centre + 8 neighbours
  localparam int unsigned N_PART    = 9;   // 16x16, 2x 16x8, 2x 8x16, 4x 8x8
  localparam int unsigned N_SLOT    = 4;   // FME operation slots per lane (Fig. 6)

  localparam int unsigned COST_W    = 20;

  typedef logic [7:0]  pix_t;
  typedef logic [COST_W-1:0] cost_t;

  // The three frames encoded in parallel
  typedef enum logic [1:0] {FR_B0 = 2'd0, FR_B1 = 2'd1, FR_P = 2'd2} frame_e;

  // Prediction direction of one partition. For the P frame DIR_L0 / DIR_L1
  // mean reference 0 / reference 1; for a B frame forward / backward.
  typedef enum logic [1:0] {DIR_L0 = 2'd0, DIR_L1 = 2'd1, DIR_BI = 2'd2} dir_e;

  typedef enum logic [1:0] {M16X16 = 2'd0, M16X8 = 2'd1, M8X16 = 2'd2, M8X8 = 2'd3} mode_e;

  // Motion vector in quarter-pel units
  typedef struct packed {
    logic signed [9:0] x;
    logic signed [9:0] y;
  } mv_t;

  // Best result of one partition for one direction
  typedef struct packed {
    cost_t cost;
    mv_t   mv0;   // list-0 / reference-0 vector
    mv_t   mv1;   // list-1 / reference-1 vector
  } part_res_t;

  // Final decision of one 8x8 quadrant of an MB
  typedef struct packed {
    dir_e  dir;
    mv_t   mv0;
    mv_t   mv1;
  } quad_dec_t;

  // Decision of one MB of one frame, handed to that frame's residual coder
  typedef struct packed {
    mode_e            mode;
    cost_t            cost;
    quad_dec_t [3:0]  quad;
  } mb_dec_t;

  // One FME operation: which frame, reference SRAM and role a lane has
  typedef enum logic [1:0] {OP_UNI = 2'd0, OP_BI = 2'd1, OP_IDLE = 2'd2} op_kind_e;

  typedef struct packed {
    op_kind_e kind;
    frame_e   frame;
    logic     ref_sel;   // SR SRAM feeding this lane's filter (the lane MUX)
  } fme_op_t;

  // Fig. 6 schedule, slot by slot. Lane 0 = interpolation filter 0, lane 1 =
  // interpolation filter 1.
  //   slot 0: B0 forward        | P  ref 1
  //   slot 1: B0 bi-directional | B0 backward
  //   slot 2: P  ref 0          | B1 backward
  //   slot 3: B1 forward        | B1 bi-directional
  function automatic fme_op_t fme_sched(input int unsigned slot, input int unsigned lane);
    fme_op_t o;
    o.ref_sel = 1'(lane);
    unique case ({2'(slot), 1'(lane)})
      3'b00_0: begin o.kind = OP_UNI; o.frame = FR_B0; end
      3'b00_1: begin o.kind = OP_UNI; o.frame = FR_P;  end
      3'b01_0: begin o.kind = OP_BI;  o.frame = FR_B0; end
      3'b01_1: begin o.kind = OP_UNI; o.frame = FR_B0; end
      3'b10_0: begin o.kind = OP_UNI; o.frame = FR_P;  end
      3'b10_1: begin o.kind = OP_UNI; o.frame = FR_B1; end
      3'b11_0: begin o.kind = OP_UNI; o.frame = FR_B1; end
      default: begin o.kind = OP_BI;  o.frame = FR_B1; end
    endcase
    return o;
  endfunction

  // H.264 6-tap half-pel kernel (1,-5,20,20,-5,1)
  function automatic logic signed [23:0] tap6(input logic signed [23:0] a, b, c, d, e, f);
    return a - 5*b + 20*c + 20*d - 5*e + f;
  endfunction

  function automatic pix_t clip8(input logic signed [23:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

endpackage

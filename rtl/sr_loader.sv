// sr_loader: Level C search-range loader on the shared system bus.
//
// For every MB position the core loads reference data once and shares it
// among the three co-located MBs (B0, B1, P). On `start` the loader fetches,
// first for reference 0 and then for reference 1, the new 16-pixel-wide
// strip at the right edge of the next SR window: SR_ROWS rows of 4 bus words,
// 320 words per reference on the 32-bit bus, as in the published case study.
// At the first MB of an MB row (`full`) it fetches all nine strips of the
// window instead. `ref_loaded[r]` rises when the last word of reference r
// has been written, so the IME can start on reference 0 while reference 1 is
// still loading (Fig. 4, proposed schedule).
//
// Bus protocol (this design's choice): a request (ref, x, y) is accepted when
// bus_req && bus_gnt; responses come back in request order, each as one
// bus_rvalid cycle carrying the pixels x..x+3 of row y, pixel x in bits 7:0.
// Since responses are in order, the write address is recomputed from a
// response counter and no tag is needed. With bus_gnt held high and a
// one-cycle memory, a reference takes 320 cycles plus the memory latency.
module sr_loader
  import fp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               full,       // load the whole window (first MB of a row)
  input  logic signed [11:0] mb_x,       // MB column of the window's current MB
  input  logic signed [11:0] mb_y,       // MB row
  input  logic [7:0]         win_base,   // physical column of the window's logical column 0
  output logic [1:0]         ref_loaded,
  output logic               busy,
  // system bus
  output logic               bus_req,
  output logic               bus_ref,
  output logic signed [15:0] bus_x,
  output logic signed [15:0] bus_y,
  input  logic               bus_gnt,
  input  logic               bus_rvalid,
  input  logic [31:0]        bus_rdata,
  // SR bank write port (shared address/data, one enable per bank)
  output logic [1:0]         sr_we,
  output logic [7:0]         sr_row,
  output logic [7:0]         sr_col,
  output logic [31:0]        sr_data
);

  localparam int unsigned WPR = MB / PIX_PER_W;   // words per strip row

  typedef struct packed {
    logic       rf;
    logic [3:0] strip;
    logic [6:0] row;
    logic [1:0] word;
  } cnt_t;

  cnt_t       req_c, rsp_c;
  logic       req_on, rsp_on;
  logic       full_q;
  logic signed [11:0] mbx_q, mby_q;
  logic [7:0] base_q;

  function automatic logic [3:0] first_strip(input logic f);
    return f ? 4'd0 : 4'd8;
  endfunction

  // next position in (ref, strip, row, word) order; last = wrapped out of ref 1
  function automatic cnt_t next_c(input cnt_t c, input logic f, output logic last);
    cnt_t n = c;
    last = 1'b0;
    if (c.word != 2'(WPR-1)) n.word = c.word + 1'b1;
    else begin
      n.word = '0;
      if (c.row != 7'(SR_ROWS-1)) n.row = c.row + 1'b1;
      else begin
        n.row = '0;
        if (c.strip != 4'd8) n.strip = c.strip + 1'b1;
        else begin
          n.strip = first_strip(f);
          if (c.rf) last = 1'b1;
          n.rf = 1'b1;
        end
      end
    end
    return n;
  endfunction

  logic req_last, rsp_last;
  cnt_t req_n, rsp_n;
  always_comb req_n = next_c(req_c, full_q, req_last);
  always_comb rsp_n = next_c(rsp_c, full_q, rsp_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_c <= '0; rsp_c <= '0; req_on <= 1'b0; rsp_on <= 1'b0;
      ref_loaded <= 2'b00; full_q <= 1'b0; mbx_q <= '0; mby_q <= '0; base_q <= '0;
    end else if (start) begin
      req_c      <= '{rf: 1'b0, strip: first_strip(full), row: '0, word: '0};
      rsp_c      <= '{rf: 1'b0, strip: first_strip(full), row: '0, word: '0};
      req_on     <= 1'b1;
      rsp_on     <= 1'b1;
      ref_loaded <= 2'b00;
      full_q     <= full;
      mbx_q      <= mb_x;
      mby_q      <= mb_y;
      base_q     <= win_base;
    end else begin
      if (req_on && bus_gnt) begin
        req_c <= req_n;
        if (req_last) req_on <= 1'b0;
      end
      if (rsp_on && bus_rvalid) begin
        rsp_c <= rsp_n;
        if (rsp_n.rf != rsp_c.rf) ref_loaded[0] <= 1'b1;
        if (rsp_last) begin
          ref_loaded[1] <= 1'b1;
          rsp_on        <= 1'b0;
        end
      end
    end
  end

  assign busy    = req_on | rsp_on;
  assign bus_req = req_on;
  assign bus_ref = req_c.rf;
  assign bus_x   = 16'(mbx_q) * 16'sd16 - 16'(MB_X0) + 16'(req_c.strip) * 16'sd16
                   + 16'(req_c.word) * 16'(PIX_PER_W);
  assign bus_y   = 16'(mby_q) * 16'sd16 - 16'(MB_Y0) + 16'(req_c.row);

  assign sr_we   = (rsp_on && bus_rvalid) ? (rsp_c.rf ? 2'b10 : 2'b01) : 2'b00;
  assign sr_row  = 8'(rsp_c.row);
  assign sr_col  = 8'((int'(base_q) + int'(rsp_c.strip) * MB + int'(rsp_c.word) * PIX_PER_W) % SR_COLS);
  assign sr_data = bus_rdata;

endmodule

// sr_bank: search-range memory of one reference frame ("Ref 0 SRAM" or
// "Ref 1 SRAM").
//
// The bank holds ROWS x COLS luma pixels. Columns are used as a circular
// buffer (Level C data reuse): when the current MB moves one MB to the right,
// only one new 16-pixel-wide strip is written and the logical origin of the
// window moves by 16 columns. Each reader therefore passes the physical column
// of its logical column 0 (`*_base`); the bank adds it modulo COLS. Keeping one
// strip more than a window needs lets the strip of the next MB be written while
// the FME of the present MB still reads its own window.
//
// Interface
//   write port : one 32-bit bus word = 4 horizontally adjacent pixels, at a
//                physical row/column (column a multiple of 4); written on clk.
//   IME port   : combinational read of an IME_R x IME_C window at logical
//                (ime_row, ime_col).
//   FME port   : combinational read of an FME_R x FME_C window at logical
//                (fme_row, fme_col).
// The SR memory as a register array with combinational reads is this design's
// choice; the source architecture only names the SRAMs and limits them to at
// most two ports, which is what this bank has besides its write port.
module sr_bank
  import fp_pkg::*;
#(
  parameter int unsigned ROWS  = SR_ROWS,
  parameter int unsigned COLS  = SR_COLS,
  parameter int unsigned IME_R = IME_ROWS,
  parameter int unsigned IME_C = MB + IME_PAR - 1,
  parameter int unsigned FME_R = 6,
  parameter int unsigned FME_C = FME_PIX + 5
) (
  input  logic        clk,
  // write port
  input  logic        we,
  input  logic [7:0]  wr_row,
  input  logic [7:0]  wr_col,
  input  logic [31:0] wr_data,
  // IME read port
  input  logic [7:0]  ime_base,
  input  logic [7:0]  ime_row,
  input  logic [7:0]  ime_col,
  output pix_t        ime_win [IME_R][IME_C],
  // FME read port
  input  logic [7:0]  fme_base,
  input  logic [7:0]  fme_row,
  input  logic [7:0]  fme_col,
  output pix_t        fme_win [FME_R][FME_C]
);

  pix_t mem [ROWS][COLS];

  function automatic int unsigned phys(input logic [7:0] base, input int unsigned lcol);
    return (int'(base) + lcol) % COLS;
  endfunction

  always_ff @(posedge clk) begin
    if (we) begin
      for (int k = 0; k < PIX_PER_W; k++)
        mem[int'(wr_row) % ROWS][(int'(wr_col) + k) % COLS] <= wr_data[8*k +: 8];
    end
  end

  always_comb begin
    for (int r = 0; r < IME_R; r++)
      for (int c = 0; c < IME_C; c++)
        ime_win[r][c] = mem[(int'(ime_row) + r) % ROWS][phys(ime_base, int'(ime_col) + c)];
  end

  always_comb begin
    for (int r = 0; r < FME_R; r++)
      for (int c = 0; c < FME_C; c++)
        fme_win[r][c] = mem[(int'(fme_row) + r) % ROWS][phys(fme_base, int'(fme_col) + c)];
  end

endmodule

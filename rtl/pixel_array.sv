// pixel_array: NROWS x NCOLS digital pixels and their readout chain.
//
// Every pixel receives the same four control signals (GLOBAL_RESET, INT_CLK,
// READ_EN, PCLK). On the chip they are re-buffered from pixel to pixel to keep
// the relative timing between them; logically that is a broadcast, which is
// how it is written here.
//
// In readout mode all pixels form one 11-bit-wide shift register. Following
// the readout figure of the description, the chain starts at the left pixel
// of the bottom row, runs left to right along each row and from the bottom
// row up to the top row; the right pixel of the top row drives `dout`. The
// first chain stage shifts in zeros. Chain position k is the pixel at row
// NROWS-1-k/NCOLS, column k%NCOLS. Per-pixel front-end signals (comp, fd_rst)
// are indexed row*NCOLS+col.
//
// Timing: with READ_EN high, word j (j = 0 .. NROWS*NCOLS-1) sits on dout
// after j rising PCLK edges; word j is the pixel at row j/NCOLS,
// column NCOLS-1-j%NCOLS.
module pixel_array
  import droic_pkg::*;
#(
  parameter int unsigned NROWS   = 16,
  parameter int unsigned NCOLS   = 16,
  parameter realtime     PULSE_W = 0.3ns
) (
  input  logic      comp   [NROWS*NCOLS],
  output logic      fd_rst [NROWS*NCOLS],
  input  logic      global_reset,
  input  logic      int_clk,
  input  logic      read_en,
  input  logic      pclk,
  output pix_word_t dout
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned NPIX = NROWS * NCOLS;

  pix_word_t chain [NPIX+1];
  assign chain[0] = '0;

  for (genvar k = 0; k < NPIX; k++) begin : g_pix
    localparam int unsigned ROW = NROWS - 1 - k / NCOLS;
    localparam int unsigned COL = k % NCOLS;
    localparam int unsigned IDX = ROW * NCOLS + COL;
    pixel_cell #(.PULSE_W(PULSE_W)) u_pix (
      .comp         (comp[IDX]),
      .fd_rst       (fd_rst[IDX]),
      .global_reset (global_reset),
      .int_clk      (int_clk),
      .read_en      (read_en),
      .pclk         (pclk),
      .din          (chain[k]),
      .dout         (chain[k+1])
    );
  end

  assign dout = chain[NPIX];
endmodule

// cand_bank: one memory module BR_i of the candidate buffer. It holds COLS consecutive
// columns of the candidate (right) image for ROWS image rows, one byte per pixel, and
// serves exactly one PE. Rows are stored in a circular order by the caller (row slot =
// image row mod ROWS), so a new row simply overwrites the oldest one.
//
// Interface: one write port (loading from the right image memory) and one read port
// (to the PE). The read is synchronous: rd_data is valid the cycle after rd_en. A read
// with rd_zero set returns zero, which is how rows outside the image read as black.
//
// The document gives the module's contents (M/n consecutive columns per module) and its
// one-to-one link to a PE; the port set and the zero-masking are this design's own.
module cand_bank
  import stereo_pkg::*;
#(
  parameter int unsigned COLS = 1,
  parameter int unsigned ROWS = 26,
  localparam int unsigned CW  = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned RW  = $clog2(ROWS)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [CW-1:0] wr_col,
  input  logic [RW-1:0] wr_row,
  input  pix_t          wr_data,
  input  logic          rd_en,
  input  logic          rd_zero,
  input  logic [CW-1:0] rd_col,
  input  logic [RW-1:0] rd_row,
  output pix_t          rd_data
);

  pix_t mem [ROWS*COLS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[int'(wr_row)*COLS + int'(wr_col)] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= rd_zero ? '0 : mem[int'(rd_row)*COLS + int'(rd_col)];
  end

endmodule

// reference_buffer: the buffer BL for the reference window, W_MAX x W_MAX pixels of the
// reference (left) image around the current reference pixel. Columns are kept circularly:
// when the reference pixel moves one step along the line only the newly needed column is
// loaded, over the column that dropped out of the window.
//
// Interface: one write port (column slot, row, pixel) for loading from the left image
// memory and one synchronous read port whose pixel appears one cycle after rd_en and is
// broadcast to all PEs.
//
// The W_MAX x W_MAX capacity follows the document; the circular column order and the
// port set are this design's own.
module reference_buffer
  import stereo_pkg::*;
#(
  parameter int unsigned W_MAX = 25,
  localparam int unsigned AW   = $clog2(W_MAX)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_col,
  input  logic [AW-1:0] wr_row,
  input  pix_t          wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_col,
  input  logic [AW-1:0] rd_row,
  output pix_t          rd_data
);

  pix_t mem [W_MAX*W_MAX];

  always_ff @(posedge clk) begin
    if (wr_en) mem[int'(wr_col)*W_MAX + int'(wr_row)] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[int'(rd_col)*W_MAX + int'(rd_row)];
  end

endmodule

// candidate_buffer: the on-chip buffer for the candidate (right) image, split into N_PE
// memory modules BR_1..BR_n. Module p holds the M/N_PE consecutive image columns
// p*(M/N_PE) .. p*(M/N_PE)+M/N_PE-1, for ROWS = W_MAX+1 image rows: the W_MAX rows that
// the current line of reference windows needs plus one row that is being loaded for the
// next line. Rows are kept circularly (row slot = image row mod ROWS).
//
// Interface: a write port takes one pixel per cycle with its image column and row slot
// and routes it to the module that owns the column. The read port applies the same
// local column and row slot to every module at once and returns one pixel per module,
// one cycle after rd_en (cand_o[p] goes to PE p). rd_zero makes every module return 0.
//
// The split into modules, the column allocation and the (W_MAX+1) x M capacity follow the
// document; the circular row order and the zero read are this design's own.
module candidate_buffer
  import stereo_pkg::*;
#(
  parameter int unsigned M     = 512,
  parameter int unsigned N_PE  = 512,
  parameter int unsigned W_MAX = 25,
  localparam int unsigned ROWS  = W_MAX + 1,
  localparam int unsigned SLOTS = M / N_PE,
  localparam int unsigned KW    = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned XW    = $clog2(M),
  localparam int unsigned RW    = $clog2(ROWS)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [XW-1:0] wr_x,      // image column
  input  logic [RW-1:0] wr_row,    // row slot
  input  pix_t          wr_data,
  input  logic          rd_en,
  input  logic          rd_zero,
  input  logic [KW-1:0] rd_k,      // local column inside every module
  input  logic [RW-1:0] rd_row,
  output pix_t          cand_o [N_PE]
);

  for (genvar p = 0; p < N_PE; p++) begin : g_bank
    logic          sel;
    logic [KW-1:0] col;
    assign sel = (int'(wr_x) / SLOTS) == p;
    assign col = KW'(int'(wr_x) % SLOTS);
    cand_bank #(.COLS(SLOTS), .ROWS(ROWS)) u_bank (
      .clk,
      .wr_en   (wr_en && sel),
      .wr_col  (col),
      .wr_row  (wr_row),
      .wr_data (wr_data),
      .rd_en, .rd_zero,
      .rd_col  (rd_k),
      .rd_row  (rd_row),
      .rd_data (cand_o[p])
    );
  end

endmodule

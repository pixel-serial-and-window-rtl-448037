// stereo_processor: stereo matching processor with a variable window size.
//
// For every pixel of the reference (left) image it searches the corresponding pixel on
// the same line of the candidate (right) image by sums of absolute differences (SADs)
// over square windows. The window starts at W_MIN x W_MIN and grows by 2 until the
// minimum of the SAD curve is clearly unique (second-best local minimum at least R_th
// above the best) or W_MAX is exceeded.
//
// Structure: a control unit; a reference buffer BL (W_MAX x W_MAX pixels) whose pixel is
// broadcast each step; a candidate buffer of N_PE memory modules holding W_MAX+1 rows
// of the right image; a SAD unit of N_PE processing elements that compute the SADs of
// all IMG_W candidate windows in parallel, one absolute difference per PE and step; and a
// minimum-value unit that finds the best match and tests its reliability.
//
// Interfaces: two external image memories (one read per cycle, data on the next cycle);
// start_i begins one depth map of IMG_H lines; res_valid_o delivers, per reference pixel
// in raster order, the matched column on the same line and the window size; done_o
// pulses after the last pixel. The host computes depth from these coordinates.
//
// Block partition, sizes and the matching algorithm follow the document; port protocols
// are this design's own.
module stereo_processor
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512,
  parameter int unsigned N_PE  = 512,
  parameter int unsigned W_MIN = 3,
  parameter int unsigned W_MAX = 25,
  localparam int unsigned SAD_W = sad_width(W_MAX),
  localparam int unsigned M     = IMG_W,
  localparam int unsigned HMAX  = (W_MAX - 1) / 2,
  localparam int unsigned SLOTS = M / N_PE,
  localparam int unsigned KW    = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned XW    = $clog2(IMG_W),
  localparam int unsigned YW    = $clog2(IMG_H),
  localparam int unsigned BW    = $clog2(W_MAX),
  localparam int unsigned RW    = $clog2(W_MAX + 1),
  localparam int unsigned HW    = $clog2(HMAX + 1),
  localparam int unsigned WW    = $clog2(W_MAX + 3)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_i,
  input  logic [SAD_W-1:0] r_th_i,     // reliability threshold R_th
  output logic             busy_o,
  output logic             done_o,
  // left image memory
  output logic             lm_req_o,
  output logic [XW-1:0]    lm_x_o,
  output logic [YW-1:0]    lm_y_o,
  input  pix_t             lm_data_i,
  // right image memory
  output logic             rm_req_o,
  output logic [XW-1:0]    rm_x_o,
  output logic [YW-1:0]    rm_y_o,
  input  pix_t             rm_data_i,
  // corresponding pixels, to the host
  output logic             res_valid_o,
  output logic [XW-1:0]    res_ul_o,
  output logic [YW-1:0]    res_vl_o,
  output logic [XW-1:0]    res_ur_o,
  output logic [WW-1:0]    res_w_o,
  output logic             res_found_o
);

  // reference buffer
  logic          bl_wr_en, bl_rd_en;
  logic [BW-1:0] bl_wr_col, bl_wr_row, bl_rd_col, bl_rd_row;
  pix_t          bl_wr_data, ref_pix;
  // candidate buffer
  logic          cb_wr_en, cb_rd_en, cb_rd_zero;
  logic [XW-1:0] cb_wr_x;
  logic [RW-1:0] cb_wr_row, cb_rd_row;
  logic [KW-1:0] cb_rd_k;
  pix_t          cb_wr_data;
  pix_t          cand [N_PE];
  // SAD unit
  op_kind_e         op;
  logic [KW-1:0]    op_k;
  logic             op_first;
  logic [SAD_W-1:0] sad [M];
  logic             snap;
  // minimum-value unit
  logic [HW-1:0]    h;
  logic             mvd_valid, mvd_reliable;
  logic [XW-1:0]    mvd_q1;
  logic [SAD_W-1:0] mvd_f, mvd_r;

  control_unit #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .N_PE(N_PE), .W_MIN(W_MIN), .W_MAX(W_MAX)
  ) u_ctrl (
    .clk, .rst_n, .start_i, .busy_o, .done_o,
    .lm_req_o, .lm_x_o, .lm_y_o, .lm_data_i,
    .rm_req_o, .rm_x_o, .rm_y_o, .rm_data_i,
    .bl_wr_en_o (bl_wr_en), .bl_wr_col_o (bl_wr_col), .bl_wr_row_o (bl_wr_row),
    .bl_wr_data_o (bl_wr_data),
    .bl_rd_en_o (bl_rd_en), .bl_rd_col_o (bl_rd_col), .bl_rd_row_o (bl_rd_row),
    .cb_wr_en_o (cb_wr_en), .cb_wr_x_o (cb_wr_x), .cb_wr_row_o (cb_wr_row),
    .cb_wr_data_o (cb_wr_data),
    .cb_rd_en_o (cb_rd_en), .cb_rd_zero_o (cb_rd_zero), .cb_rd_k_o (cb_rd_k),
    .cb_rd_row_o (cb_rd_row),
    .op_o (op), .k_o (op_k), .first_o (op_first),
    .h_o (h),
    .mvd_valid_i (mvd_valid), .mvd_reliable_i (mvd_reliable), .mvd_q1_i (mvd_q1),
    .res_valid_o, .res_ul_o, .res_vl_o, .res_ur_o, .res_w_o, .res_found_o
  );

  reference_buffer #(.W_MAX(W_MAX)) u_bl (
    .clk,
    .wr_en (bl_wr_en), .wr_col (bl_wr_col), .wr_row (bl_wr_row), .wr_data (bl_wr_data),
    .rd_en (bl_rd_en), .rd_col (bl_rd_col), .rd_row (bl_rd_row), .rd_data (ref_pix)
  );

  candidate_buffer #(.M(M), .N_PE(N_PE), .W_MAX(W_MAX)) u_br (
    .clk,
    .wr_en (cb_wr_en), .wr_x (cb_wr_x), .wr_row (cb_wr_row), .wr_data (cb_wr_data),
    .rd_en (cb_rd_en), .rd_zero (cb_rd_zero), .rd_k (cb_rd_k), .rd_row (cb_rd_row),
    .cand_o (cand)
  );

  sad_unit #(.M(M), .N_PE(N_PE), .SAD_W(SAD_W)) u_sad (
    .clk, .rst_n,
    .op_i (op), .k_i (op_k), .first_i (op_first),
    .ref_i (ref_pix), .cand_i (cand),
    .sad_o (sad), .snap_o (snap)
  );

  min_value_unit #(.M(M), .SAD_W(SAD_W), .HW(HW)) u_mvd (
    .clk, .rst_n,
    .valid_i (snap), .sad_i (sad), .h_i (h), .r_th_i,
    .res_valid_o (mvd_valid), .q1_o (mvd_q1), .f_q1_o (mvd_f), .r_o (mvd_r),
    .reliable_o (mvd_reliable)
  );

endmodule

// tb_stereo_processor: end-to-end test of stereo_processor at a reduced size (48 x 14
// image, 12 PEs with 4 candidate windows each, windows 3 to 11). A whole depth map is
// computed; see stereo_tb_body.svh for the images, the reference model and the checks.
module tb_stereo_processor;
  import stereo_pkg::*;
  localparam int IMG_W = 48, IMG_H = 14, N_PE = 12, W_MIN = 3, W_MAX = 11;
  localparam int RTH = 100, DISP = 4, PATTERN = 0, CHECK_EVERY = 1, MAX_CYCLES = 3_000_000;
  localparam int XW = $clog2(IMG_W), YW = $clog2(IMG_H), WW = $clog2(W_MAX + 3);

  logic clk = 1'b0, rst_n = 1'b0, start, busy, done;
  logic lm_req, rm_req;
  logic [XW-1:0] lm_x, rm_x;
  logic [YW-1:0] lm_y, rm_y;
  pix_t lm_data, rm_data;
  logic res_valid, res_found;
  logic [XW-1:0] res_ul, res_ur;
  logic [YW-1:0] res_vl;
  logic [WW-1:0] res_w;

  image_memory_model #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_lm (
    .clk, .req(lm_req), .x(lm_x), .y(lm_y), .data(lm_data));
  image_memory_model #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_rm (
    .clk, .req(rm_req), .x(rm_x), .y(rm_y), .data(rm_data));

  stereo_processor #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .N_PE(N_PE), .W_MIN(W_MIN), .W_MAX(W_MAX)
  ) dut (
    .clk, .rst_n, .start_i(start), .r_th_i(stereo_pkg::sad_width(W_MAX)'(RTH)),
    .busy_o(busy), .done_o(done),
    .lm_req_o(lm_req), .lm_x_o(lm_x), .lm_y_o(lm_y), .lm_data_i(lm_data),
    .rm_req_o(rm_req), .rm_x_o(rm_x), .rm_y_o(rm_y), .rm_data_i(rm_data),
    .res_valid_o(res_valid), .res_ul_o(res_ul), .res_vl_o(res_vl), .res_ur_o(res_ur),
    .res_w_o(res_w), .res_found_o(res_found));

  `include "stereo_tb_body.svh"
endmodule

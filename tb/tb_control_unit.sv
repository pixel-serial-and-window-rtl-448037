// tb_control_unit: self-checking test of the control unit on an 8 x 3 image with 4 PEs
// of 2 candidate windows each and window sizes 3 and 5. The testbench models the image
// memories, the reference and candidate buffers (written only through the control
// unit's write ports) and the minimum-value unit, which answers a few cycles after each
// snap and declares Q1 reliable from a per-pixel window size on (3, 5 or never).
// It checks that:
//  - every accumulate step reads, from the buffers as loaded, the reference pixel (i,j)
//    of the current window and, in every module, the candidate pixel of row j (or
//    requests zero for a row outside the image),
//  - the op stream is W*W*(M/n) accumulates with first set on the first (i,j), a shift
//    between columns and one snap, and takes W*W*(M/n) + W cycles,
//  - the window grows by 2 until reliable or W_MAX, and one result per pixel comes out
//    in raster order with the right window size, found flag and column.
module tb_control_unit;
  import stereo_pkg::*;
  localparam int IMG_W = 8, IMG_H = 3, N_PE = 4, W_MIN = 3, W_MAX = 5;
  localparam int M = IMG_W, S = M / N_PE, HMAX = (W_MAX - 1) / 2, ROWS = W_MAX + 1;
  localparam int MVD_DELAY = 4;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic lm_req, rm_req;
  logic [2:0] lm_x, rm_x;
  logic [1:0] lm_y, rm_y;
  pix_t lm_data, rm_data;
  logic bl_wr_en, bl_rd_en;
  logic [2:0] bl_wr_col, bl_wr_row, bl_rd_col, bl_rd_row;
  pix_t bl_wr_data;
  logic cb_wr_en, cb_rd_en, cb_rd_zero;
  logic [2:0] cb_wr_x, cb_wr_row, cb_rd_row;
  logic cb_rd_k;
  pix_t cb_wr_data;
  op_kind_e op;
  logic op_k, op_first;
  logic [1:0] h;
  logic mvd_valid = 1'b0, mvd_rel = 1'b0;
  logic [2:0] mvd_q1 = '0;
  logic res_valid, res_found;
  logic [2:0] res_ul, res_ur;
  logic [1:0] res_vl;
  logic [2:0] res_w;
  int checks = 0, failures = 0;
  longint cyc = 0;

  control_unit #(.IMG_W(IMG_W), .IMG_H(IMG_H), .N_PE(N_PE), .W_MIN(W_MIN), .W_MAX(W_MAX)) dut (
    .clk, .rst_n, .start_i(start), .busy_o(busy), .done_o(done),
    .lm_req_o(lm_req), .lm_x_o(lm_x), .lm_y_o(lm_y), .lm_data_i(lm_data),
    .rm_req_o(rm_req), .rm_x_o(rm_x), .rm_y_o(rm_y), .rm_data_i(rm_data),
    .bl_wr_en_o(bl_wr_en), .bl_wr_col_o(bl_wr_col), .bl_wr_row_o(bl_wr_row),
    .bl_wr_data_o(bl_wr_data), .bl_rd_en_o(bl_rd_en), .bl_rd_col_o(bl_rd_col),
    .bl_rd_row_o(bl_rd_row),
    .cb_wr_en_o(cb_wr_en), .cb_wr_x_o(cb_wr_x), .cb_wr_row_o(cb_wr_row),
    .cb_wr_data_o(cb_wr_data), .cb_rd_en_o(cb_rd_en), .cb_rd_zero_o(cb_rd_zero),
    .cb_rd_k_o(cb_rd_k), .cb_rd_row_o(cb_rd_row),
    .op_o(op), .k_o(op_k), .first_o(op_first), .h_o(h),
    .mvd_valid_i(mvd_valid), .mvd_reliable_i(mvd_rel), .mvd_q1_i(mvd_q1),
    .res_valid_o(res_valid), .res_ul_o(res_ul), .res_vl_o(res_vl), .res_ur_o(res_ur),
    .res_w_o(res_w), .res_found_o(res_found));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lpix(int x, int y); return (x * 37 + y * 11 + 5) % 251 + 1; endfunction
  function automatic int rpix(int x, int y); return (x * 53 + y * 29 + 7) % 241 + 1; endfunction
  function automatic bit in_img(int x, int y); return x >= 0 && x < IMG_W && y >= 0 && y < IMG_H; endfunction
  // window size from which Q1 is declared reliable (7: never)
  function automatic int target(int ul, int vl); return 3 + 2 * ((ul + 2 * vl) % 3); endfunction
  function automatic int q1_of(int ul, int vl, int w); return (ul * 3 + vl + w) % IMG_W; endfunction

  task automatic chk(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d want %0d at %0d", what, got, want, cyc);
    end
  endtask

  // memories: one cycle read latency
  always @(posedge clk) begin
    if (lm_req) lm_data <= pix_t'(lpix(int'(lm_x), int'(lm_y)));
    if (rm_req) rm_data <= pix_t'(rpix(int'(rm_x), int'(rm_y)));
  end

  // buffer models, written only by the control unit
  int bl [W_MAX][W_MAX];
  int cb [ROWS][M];
  always @(posedge clk) begin
    if (bl_wr_en) bl[bl_wr_col][bl_wr_row] <= int'(bl_wr_data);
    if (cb_wr_en) cb[cb_wr_row][cb_wr_x] <= int'(cb_wr_data);
  end

  // expected accumulate steps and op stream
  typedef struct { int ul, vl, i, j, k; } acc_t;
  typedef struct { op_kind_e op; bit first; int k; } opx_t;
  typedef struct { int ul, vl, w, ur; bit found; } res_t;
  acc_t acc_q [$];
  opx_t op_q [$];
  res_t res_q [$];
  int n_expand = 0, n_nf = 0;

  initial begin
    for (int vl = 0; vl < IMG_H; vl++)
      for (int ul = 0; ul < IMG_W; ul++)
        for (int w = W_MIN; ; w += 2) begin
          automatic int hh = (w - 1) / 2;
          automatic res_t r;
          for (int i = -hh; i <= hh; i++) begin
            for (int j = -hh; j <= hh; j++)
              for (int k = 0; k < S; k++) begin
                acc_q.push_back('{ul, vl, i, j, k});
                op_q.push_back('{OP_ACC, (i == -hh && j == -hh), k});
              end
            if (i != hh) op_q.push_back('{OP_SHIFT, 1'b0, 0});
          end
          op_q.push_back('{OP_SNAP, 1'b0, 0});
          if (w >= target(ul, vl) || w + 2 > W_MAX) begin
            r = '{ul, vl, w, q1_of(ul, vl, w), w >= target(ul, vl)};
            res_q.push_back(r);
            break;
          end
        end
  end

  // checks on the issued reads
  always @(negedge clk) begin
    if (rst_n && bl_rd_en) begin
      acc_t a;
      int y;
      if (acc_q.size() == 0) begin
        chk("unexpected accumulate", 1, 0);
      end else begin
        a = acc_q.pop_front();
        y = a.vl + a.j;
        chk("reference pixel", bl[bl_rd_col][bl_rd_row],
            in_img(a.ul + a.i, y) ? lpix(a.ul + a.i, y) : 0);
        chk("cb_rd_en", int'(cb_rd_en), 1);
        chk("cb_rd_k", int'(cb_rd_k), a.k);
        chk("zero row", int'(cb_rd_zero), int'(!in_img(0, y)));
        if (in_img(0, y))
          for (int p = 0; p < N_PE; p++)
            chk("candidate pixel", cb[cb_rd_row][p * S + a.k], rpix(p * S + a.k, y));
      end
    end
  end

  // op stream, window timing and minimum-value unit stub
  longint first_acc = -1;
  int cur_w = W_MIN;
  always @(negedge clk) begin
    if (rst_n && op != OP_NOP) begin
      opx_t e;
      if (op_q.size() == 0) chk("unexpected op", 1, 0);
      else begin
        e = op_q.pop_front();
        chk("op kind", int'(op), int'(e.op));
        if (e.op == OP_ACC) begin
          chk("first", int'(op_first), int'(e.first));
          chk("k", int'(op_k), e.k);
          if (e.first && e.k == 0) first_acc = cyc;
        end
        if (op == OP_SNAP) begin
          cur_w = 2 * int'(h) + 1;
          chk("cycles per window", int'(cyc - first_acc), cur_w * cur_w * S + cur_w - 1);
          fork begin
            automatic int w = cur_w;
            automatic int ul = int'(dut.ul), vl = int'(dut.vl);
            repeat (MVD_DELAY) @(negedge clk);
            mvd_valid = 1'b1;
            mvd_rel = (w >= target(ul, vl));
            mvd_q1 = 3'(q1_of(ul, vl, w));
            @(negedge clk);
            mvd_valid = 1'b0;
          end join_none
        end
      end
    end
  end

  always @(negedge clk) begin
    if (res_valid) begin
      res_t r;
      if (res_q.size() == 0) chk("unexpected result", 1, 0);
      else begin
        r = res_q.pop_front();
        chk("res ul", int'(res_ul), r.ul);
        chk("res vl", int'(res_vl), r.vl);
        chk("res w", int'(res_w), r.w);
        chk("res ur", int'(res_ur), r.ur);
        chk("res found", int'(res_found), int'(r.found));
        if (r.w > W_MIN) n_expand++;
        if (!r.found) n_nf++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    repeat (3) @(negedge clk);
    chk("all accumulates issued", acc_q.size(), 0);
    chk("all ops issued", op_q.size(), 0);
    chk("all results", res_q.size(), 0);
    chk("expansion happened", int'(n_expand > 0), 1);
    chk("no corresponding pixel happened", int'(n_nf > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

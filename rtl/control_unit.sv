// control_unit: sequencing of the stereo matching processor.
//
// Reference pixels are visited in raster order. For each reference pixel the window
// size starts at W_MIN; the SADs of all M candidate windows on the epipolar line are
// computed, the minimum-value unit returns Q1 and the test R > R_th, and the window is
// enlarged by 2 until Q1 is reliable or W+2 would exceed W_MAX, in which case the pixel
// has no corresponding pixel. One result is emitted per reference pixel.
//
// Inside one window size the control steps are issued pixel-serially, column by column
// of the window: for each column offset i and each row offset j the reference pixel
// (i,j) is broadcast and every PE takes one absolute difference for each of its M/n
// candidate positions; between two columns one OP_SHIFT moves all partial SADs one
// position to the right; an OP_SNAP closes the window. A window of size W therefore takes
// W*W*(M/n) + W control steps, followed by the latency of the minimum-value unit.
//
// Two loaders fill the buffers. The right loader streams image rows, one pixel per
// cycle, into the candidate buffer, whose row slot is the image row mod (W_MAX+1). While
// line VL is being matched it already loads row VL+(W_MAX-1)/2+1, so after the first
// line the candidate buffer is refilled in the background. The left loader fills the
// W_MAX x W_MAX reference buffer: all W_MAX columns at the start of a line, then one new
// column per reference pixel, before the matching of that pixel starts. Pixels outside
// the image are read as zero.
//
// Image memories: one read per cycle and port, data returned on the next cycle.
// Result: res_valid_o pulses once per reference pixel with its coordinates (ul, vl), the
// column ur of the corresponding pixel on the same line, the window size used and
// whether a reliable corresponding pixel was found. There is no back-pressure.
//
// The iteration over window sizes, the raster order of reference windows, the one-row
// refill of the candidate buffer and its (W_MAX+1)-row depth follow the document. The
// column-by-column step order, the shift steps, the loaders, zero padding at the image
// border and all handshakes are this design's own.
module control_unit
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512,
  parameter int unsigned N_PE  = 512,
  parameter int unsigned W_MIN = 3,
  parameter int unsigned W_MAX = 25,
  localparam int unsigned M     = IMG_W,
  localparam int unsigned HMAX  = (W_MAX - 1) / 2,
  localparam int unsigned ROWS  = W_MAX + 1,
  localparam int unsigned SLOTS = M / N_PE,
  localparam int unsigned KW    = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned XW    = $clog2(IMG_W),
  localparam int unsigned YW    = $clog2(IMG_H),
  localparam int unsigned BW    = $clog2(W_MAX),
  localparam int unsigned RW    = $clog2(ROWS),
  localparam int unsigned HW    = $clog2(HMAX + 1),
  localparam int unsigned WW    = $clog2(W_MAX + 3)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  output logic          busy_o,
  output logic          done_o,
  // left (reference) image memory
  output logic          lm_req_o,
  output logic [XW-1:0] lm_x_o,
  output logic [YW-1:0] lm_y_o,
  input  pix_t          lm_data_i,
  // right (candidate) image memory
  output logic          rm_req_o,
  output logic [XW-1:0] rm_x_o,
  output logic [YW-1:0] rm_y_o,
  input  pix_t          rm_data_i,
  // reference buffer
  output logic          bl_wr_en_o,
  output logic [BW-1:0] bl_wr_col_o,
  output logic [BW-1:0] bl_wr_row_o,
  output pix_t          bl_wr_data_o,
  output logic          bl_rd_en_o,
  output logic [BW-1:0] bl_rd_col_o,
  output logic [BW-1:0] bl_rd_row_o,
  // candidate buffer
  output logic          cb_wr_en_o,
  output logic [XW-1:0] cb_wr_x_o,
  output logic [RW-1:0] cb_wr_row_o,
  output pix_t          cb_wr_data_o,
  output logic          cb_rd_en_o,
  output logic          cb_rd_zero_o,
  output logic [KW-1:0] cb_rd_k_o,
  output logic [RW-1:0] cb_rd_row_o,
  // SAD unit op stream, aligned with the buffer read data
  output op_kind_e      op_o,
  output logic [KW-1:0] k_o,
  output logic          first_o,
  // minimum-value unit
  output logic [HW-1:0] h_o,
  input  logic          mvd_valid_i,
  input  logic          mvd_reliable_i,
  input  logic [XW-1:0] mvd_q1_i,
  // corresponding-pixel results to the host
  output logic          res_valid_o,
  output logic [XW-1:0] res_ul_o,
  output logic [YW-1:0] res_vl_o,
  output logic [XW-1:0] res_ur_o,
  output logic [WW-1:0] res_w_o,
  output logic          res_found_o
);

  typedef logic signed [YW+2:0] srow_t;
  typedef logic signed [XW+2:0] scol_t;

  // ------------------------------------------------------------------ right loader
  logic [YW:0]    rl_row;      // next image row to load
  logic [XW-1:0]  rl_x;
  logic [RW-1:0]  rl_slot;
  srow_t          rl_target;   // load rows up to this one
  logic           rl_go;
  logic           rl_wr_q;
  logic [XW-1:0]  rl_x_q;
  logic [RW-1:0]  rl_slot_q;

  assign rl_go = (srow_t'(rl_row) <= rl_target) && (rl_row < (YW+1)'(IMG_H));

  // set by the main FSM
  logic  rl_init, rl_set_target;
  srow_t rl_new_target;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rl_row    <= '0;
      rl_x      <= '0;
      rl_slot   <= '0;
      rl_target <= -srow_t'(1);
      rl_wr_q   <= 1'b0;
      rl_x_q    <= '0;
      rl_slot_q <= '0;
    end else begin
      rl_wr_q   <= rl_go;
      rl_x_q    <= rl_x;
      rl_slot_q <= rl_slot;
      if (rl_init) begin
        rl_row    <= '0;
        rl_x      <= '0;
        rl_slot   <= '0;
        rl_target <= srow_t'(HMAX);
      end else begin
        if (rl_set_target) rl_target <= rl_new_target;
        if (rl_go) begin
          if (rl_x == XW'(IMG_W - 1)) begin
            rl_x    <= '0;
            rl_row  <= rl_row + 1'b1;
            rl_slot <= (rl_slot == RW'(ROWS - 1)) ? '0 : rl_slot + 1'b1;
          end else begin
            rl_x <= rl_x + 1'b1;
          end
        end
      end
    end
  end

  assign rm_req_o     = rl_go;
  assign rm_x_o       = rl_x;
  assign rm_y_o       = YW'(rl_row);
  assign cb_wr_en_o   = rl_wr_q;
  assign cb_wr_x_o    = rl_x_q;
  assign cb_wr_row_o  = rl_slot_q;
  assign cb_wr_data_o = rm_data_i;

  // ------------------------------------------------------------------ left loader
  logic           ll_busy;
  scol_t          ll_x;        // image column being loaded
  logic [BW-1:0]  ll_r;        // row inside the window
  logic [BW-1:0]  ll_slot;     // column slot in the reference buffer
  logic [BW:0]    ll_cnt;      // columns still to load
  logic           ll_wr_q, ll_in_q;
  logic [BW-1:0]  ll_r_q, ll_slot_q;
  logic           ll_in;
  srow_t          ll_y;

  logic           ll_start;
  scol_t          ll_start_x;
  logic [BW-1:0]  ll_start_slot;
  logic [BW:0]    ll_start_cnt;

  logic [YW-1:0]  vl;

  assign ll_y  = srow_t'(vl) - srow_t'(HMAX) + srow_t'(ll_r);
  assign ll_in = ll_busy && (ll_x >= 0) && (ll_x < scol_t'(IMG_W))
                         && (ll_y >= 0) && (ll_y < srow_t'(IMG_H));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ll_busy   <= 1'b0;
      ll_x      <= '0;
      ll_r      <= '0;
      ll_slot   <= '0;
      ll_cnt    <= '0;
      ll_wr_q   <= 1'b0;
      ll_in_q   <= 1'b0;
      ll_r_q    <= '0;
      ll_slot_q <= '0;
    end else begin
      ll_wr_q   <= ll_busy;
      ll_in_q   <= ll_in;
      ll_r_q    <= ll_r;
      ll_slot_q <= ll_slot;
      if (ll_start) begin
        ll_busy <= 1'b1;
        ll_x    <= ll_start_x;
        ll_r    <= '0;
        ll_slot <= ll_start_slot;
        ll_cnt  <= ll_start_cnt;
      end else if (ll_busy) begin
        if (ll_r == BW'(W_MAX - 1)) begin
          ll_r    <= '0;
          ll_x    <= ll_x + 1'b1;
          ll_slot <= (ll_slot == BW'(W_MAX - 1)) ? '0 : ll_slot + 1'b1;
          ll_cnt  <= ll_cnt - 1'b1;
          if (ll_cnt == (BW+1)'(1)) ll_busy <= 1'b0;
        end else begin
          ll_r <= ll_r + 1'b1;
        end
      end
    end
  end

  assign lm_req_o     = ll_in;
  assign lm_x_o       = XW'(ll_x);
  assign lm_y_o       = YW'(ll_y);
  assign bl_wr_en_o   = ll_wr_q;
  assign bl_wr_col_o  = ll_slot_q;
  assign bl_wr_row_o  = ll_r_q;
  assign bl_wr_data_o = ll_in_q ? lm_data_i : '0;

  // ------------------------------------------------------------------ main sequencer
  typedef enum logic [2:0] {S_IDLE, S_LINE, S_REF, S_ISSUE, S_WAIT} state_e;
  state_e state;

  logic [XW-1:0]  ul;
  logic [BW-1:0]  ul_slot;     // reference-buffer slot of column ul-HMAX (= ul mod W_MAX)
  logic [RW-1:0]  vl_slot;     // candidate-buffer slot of row vl (= vl mod ROWS)
  logic [WW-1:0]  w;
  logic [HW-1:0]  h;
  logic [BW-1:0]  ci, cj;      // window column / row offsets + HMAX
  logic [KW-1:0]  k;
  logic [BW-1:0]  bcs;         // reference-buffer column slot of column ci
  logic [RW-1:0]  rs, rs0;     // candidate-buffer row slot of row cj, and of the first row
  logic           shift_pend, snap_pend;

  // next-state values of the window counters for a window of half size hh
  function automatic logic [RW-1:0] row_slot_start(logic [RW-1:0] vs, logic [HW-1:0] hh);
    int unsigned t;
    t = int'(vs) + ROWS - int'(hh);
    return RW'((t >= ROWS) ? t - ROWS : t);
  endfunction

  function automatic logic [BW-1:0] col_slot(logic [BW-1:0] us, logic [BW-1:0] c);
    int unsigned t;
    t = int'(us) + int'(c);
    return BW'((t >= W_MAX) ? t - W_MAX : t);
  endfunction

  logic rows_ready, ll_done;
  srow_t need_row;
  assign need_row   = (srow_t'(vl) + srow_t'(HMAX) < srow_t'(IMG_H))
                    ? srow_t'(vl) + srow_t'(HMAX) : srow_t'(IMG_H - 1);
  assign rows_ready = (srow_t'(rl_row) > need_row) && !rl_wr_q;
  assign ll_done    = !ll_busy && !ll_wr_q && !ll_start;

  // op issued this cycle (registered towards the SAD unit)
  op_kind_e      op_n;
  logic          first_n;
  srow_t         cand_y;

  assign cand_y = srow_t'(vl) + srow_t'(cj) - srow_t'(HMAX);

  always_comb begin
    op_n          = OP_NOP;
    first_n       = 1'b0;
    bl_rd_en_o    = 1'b0;
    cb_rd_en_o    = 1'b0;
    rl_init       = 1'b0;
    rl_set_target = 1'b0;
    rl_new_target = srow_t'(vl) + srow_t'(HMAX + 1);
    ll_start      = 1'b0;
    ll_start_x    = -scol_t'(HMAX);
    ll_start_slot = '0;
    ll_start_cnt  = (BW+1)'(W_MAX);
    unique case (state)
      S_IDLE:  rl_init = start_i;
      S_LINE:  if (rows_ready) begin
                 rl_set_target = 1'b1;
                 ll_start      = 1'b1;
               end
      S_ISSUE: begin
        if (snap_pend)       op_n = OP_SNAP;
        else if (shift_pend) op_n = OP_SHIFT;
        else begin
          op_n       = OP_ACC;
          first_n    = (ci == BW'(HMAX) - BW'(h)) && (cj == BW'(HMAX) - BW'(h));
          bl_rd_en_o = 1'b1;
          cb_rd_en_o = 1'b1;
        end
      end
      default: ;
    endcase
    // the next reference column is loaded as soon as a pixel is finished
    if (state == S_WAIT && mvd_valid_i && (mvd_reliable_i || (int'(w) + 2 > W_MAX))
        && ul != XW'(IMG_W - 1)) begin
      ll_start      = 1'b1;
      ll_start_x    = scol_t'(ul) + scol_t'(HMAX + 1);
      ll_start_slot = ul_slot;
      ll_start_cnt  = (BW+1)'(1);
    end
  end

  assign bl_rd_col_o  = bcs;
  assign bl_rd_row_o  = cj;
  assign cb_rd_k_o    = k;
  assign cb_rd_row_o  = rs;
  assign cb_rd_zero_o = (cand_y < 0) || (cand_y >= srow_t'(IMG_H));

  // start a window of size ww
  task automatic init_window(input logic [WW-1:0] ww);
    logic [HW-1:0] hh;
    hh  = HW'((ww - 1'b1) >> 1);
    w          <= ww;
    h          <= hh;
    ci         <= BW'(HMAX) - BW'(hh);
    cj         <= BW'(HMAX) - BW'(hh);
    k          <= '0;
    bcs        <= col_slot(ul_slot, BW'(HMAX) - BW'(hh));
    rs         <= row_slot_start(vl_slot, hh);
    rs0        <= row_slot_start(vl_slot, hh);
    shift_pend <= 1'b0;
    snap_pend  <= 1'b0;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      vl          <= '0;
      ul          <= '0;
      ul_slot     <= '0;
      vl_slot     <= '0;
      w           <= WW'(W_MIN);
      h           <= '0;
      ci          <= '0;
      cj          <= '0;
      k           <= '0;
      bcs         <= '0;
      rs          <= '0;
      rs0         <= '0;
      shift_pend  <= 1'b0;
      snap_pend   <= 1'b0;
      op_o        <= OP_NOP;
      k_o         <= '0;
      first_o     <= 1'b0;
      res_valid_o <= 1'b0;
      res_ul_o    <= '0;
      res_vl_o    <= '0;
      res_ur_o    <= '0;
      res_w_o     <= '0;
      res_found_o <= 1'b0;
      done_o      <= 1'b0;
    end else begin
      op_o        <= op_n;
      k_o         <= k;
      first_o     <= first_n;
      res_valid_o <= 1'b0;
      done_o      <= 1'b0;
      unique case (state)
        S_IDLE: if (start_i) begin
          vl      <= '0;
          vl_slot <= '0;
          state   <= S_LINE;
        end
        S_LINE: if (rows_ready) begin
          ul      <= '0;
          ul_slot <= '0;
          state   <= S_REF;
        end
        S_REF: if (ll_done) begin
          init_window(WW'(W_MIN));
          state <= S_ISSUE;
        end
        S_ISSUE: begin
          if (snap_pend) begin
            snap_pend <= 1'b0;
            state     <= S_WAIT;
          end else if (shift_pend) begin
            shift_pend <= 1'b0;
          end else begin
            if (k == KW'(SLOTS - 1)) begin
              k <= '0;
              if (cj == BW'(HMAX) + BW'(h)) begin
                cj <= BW'(HMAX) - BW'(h);
                rs <= rs0;
                if (ci == BW'(HMAX) + BW'(h)) begin
                  snap_pend <= 1'b1;
                end else begin
                  ci         <= ci + 1'b1;
                  bcs        <= (bcs == BW'(W_MAX - 1)) ? '0 : bcs + 1'b1;
                  shift_pend <= 1'b1;
                end
              end else begin
                cj <= cj + 1'b1;
                rs <= (rs == RW'(ROWS - 1)) ? '0 : rs + 1'b1;
              end
            end else begin
              k <= k + 1'b1;
            end
          end
        end
        S_WAIT: if (mvd_valid_i) begin
          if (mvd_reliable_i || (int'(w) + 2 > W_MAX)) begin
            res_valid_o <= 1'b1;
            res_ul_o    <= ul;
            res_vl_o    <= vl;
            res_ur_o    <= mvd_q1_i;
            res_w_o     <= w;
            res_found_o <= mvd_reliable_i;
            if (ul != XW'(IMG_W - 1)) begin
              ul      <= ul + 1'b1;
              ul_slot <= (ul_slot == BW'(W_MAX - 1)) ? '0 : ul_slot + 1'b1;
              state   <= S_REF;
            end else if (vl != YW'(IMG_H - 1)) begin
              vl      <= vl + 1'b1;
              vl_slot <= (vl_slot == RW'(ROWS - 1)) ? '0 : vl_slot + 1'b1;
              state   <= S_LINE;
            end else begin
              done_o <= 1'b1;
              state  <= S_IDLE;
            end
          end else begin
            init_window(w + WW'(2));
            state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state != S_IDLE);
  assign h_o    = h;

  // the minimum-value unit answers only to a window that was closed
  a_mvd_in_wait: assert property (@(posedge clk) disable iff (!rst_n)
                                  mvd_valid_i |-> state == S_WAIT);

endmodule

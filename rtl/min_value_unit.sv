// min_value_unit: minimum-value detection on the SAD curve of one window size.
//
// It samples the M SADs of the candidate positions when valid_i is high. Slot s holds
// the SAD of the candidate window centred on image column s - h, where h = (W-1)/2 is
// the half window size; only slots s >= 2h hold a window that lies completely inside the
// image, the others are ignored. A valid slot is a local minimum when its SAD is not
// larger than its left valid neighbour and smaller than its right valid neighbour (a
// flat valley counts once, at its right end). A tree of comparators, one register stage
// per level, then finds the smallest local minimum Q1 (lowest position on a tie) and the
// second smallest local minimum Q2. The reliability measure is R = F(Q2) - F(Q1); with a
// single local minimum R is taken as the largest value. Q1 is reliable when R > r_th_i.
//
// Timing: fully pipelined, LAT = 3 + clog2(M) cycles from valid_i to res_valid_o; a new
// set of SADs may be accepted every cycle. h_i and r_th_i are sampled with the SADs.
//
// Q1, Q2, R and the test R > R_th follow the document; the handling of flat valleys, of
// the image border and of a curve with one local minimum is this design's own.
module min_value_unit #(
  parameter int unsigned M     = 512,
  parameter int unsigned SAD_W = 18,
  parameter int unsigned HW    = 4,                 // width of the half window size
  localparam int unsigned XW   = $clog2(M),
  localparam int unsigned LV   = $clog2(M),
  localparam int unsigned NL   = 1 << LV
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_i,
  input  logic [SAD_W-1:0] sad_i [M],
  input  logic [HW-1:0]    h_i,
  input  logic [SAD_W-1:0] r_th_i,
  output logic             res_valid_o,
  output logic [XW-1:0]    q1_o,        // image column of the centre of Q1's window
  output logic [SAD_W-1:0] f_q1_o,
  output logic [SAD_W-1:0] r_o,
  output logic             reliable_o
);

  typedef struct packed {
    logic             has1;
    logic [SAD_W-1:0] min1;
    logic [XW-1:0]    idx1;
    logic             has2;
    logic [SAD_W-1:0] min2;
  } node_t;

  function automatic node_t combine(node_t a, node_t b);
    node_t r;
    if (!a.has1)      r = b;
    else if (!b.has1) r = a;
    else if (a.min1 <= b.min1) begin
      r      = a;
      r.has2 = 1'b1;
      r.min2 = (a.has2 && a.min2 < b.min1) ? a.min2 : b.min1;
    end else begin
      r      = b;
      r.has2 = 1'b1;
      r.min2 = (b.has2 && b.min2 < a.min1) ? b.min2 : a.min1;
    end
    return r;
  endfunction

  // stage 0: sample the SAD curve
  logic [M-1:0][SAD_W-1:0] f_q;
  logic [HW-1:0]           h_q;
  logic [SAD_W-1:0]        th_q;
  logic                    v0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0   <= 1'b0;
      h_q  <= '0;
      th_q <= '0;
    end else begin
      v0 <= valid_i;
      if (valid_i) begin
        h_q  <= h_i;
        th_q <= r_th_i;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (valid_i)
      for (int s = 0; s < M; s++) f_q[s] <= sad_i[s];
  end

  // stage 1: local-minimum leaves (positions beyond M are empty)
  node_t [NL-1:0] leaf;

  for (genvar s = 0; s < NL; s++) begin : g_leaf
    if (s < M) begin : g_in
      logic ok, lok, rok;
      assign ok = s >= 2 * int'(h_q);
      if (s == 0) begin : g_l0
        assign lok = 1'b1;
      end else begin : g_l
        assign lok = (s - 1 < 2 * int'(h_q)) || (f_q[s] <= f_q[s-1]);
      end
      if (s == M - 1) begin : g_rn
        assign rok = 1'b1;
      end else begin : g_r
        assign rok = f_q[s] < f_q[s+1];
      end
      always_ff @(posedge clk) begin
        leaf[s].has1 <= ok && lok && rok;
        leaf[s].min1 <= f_q[s];
        leaf[s].idx1 <= XW'(s);
        leaf[s].has2 <= 1'b0;
        leaf[s].min2 <= '0;
      end
    end else begin : g_pad
      assign leaf[s] = '0;
    end
  end

  // the valid flag, half window size and threshold travel with the data
  logic             vt  [LV+1];
  logic [HW-1:0]    ht  [LV+1];
  logic [SAD_W-1:0] tht [LV+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l <= LV; l++) begin
        vt[l]  <= 1'b0;
        ht[l]  <= '0;
        tht[l] <= '0;
      end
    end else begin
      vt[0]  <= v0;
      ht[0]  <= h_q;
      tht[0] <= th_q;
      for (int l = 1; l <= LV; l++) begin
        vt[l]  <= vt[l-1];
        ht[l]  <= ht[l-1];
        tht[l] <= tht[l-1];
      end
    end
  end

  // stages 2 .. LV+1: comparator tree, level l has NL >> l nodes
  for (genvar l = 1; l <= LV; l++) begin : g_lvl
    node_t [(NL >> l)-1:0] nd;
    node_t [(NL >> (l-1))-1:0] below;
    if (l == 1) begin : g_from_leaf
      assign below = leaf;
    end else begin : g_from_lvl
      assign below = g_lvl[l-1].nd;
    end
    always_ff @(posedge clk) begin
      for (int n = 0; n < (NL >> l); n++) nd[n] <= combine(below[2*n], below[2*n+1]);
    end
  end

  // last stage: R, the threshold test and the window centre of Q1
  node_t root;
  assign root = g_lvl[LV].nd[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid_o <= 1'b0;
      q1_o        <= '0;
      f_q1_o      <= '0;
      r_o         <= '0;
      reliable_o  <= 1'b0;
    end else begin
      res_valid_o <= vt[LV];
      q1_o        <= root.idx1 - XW'(ht[LV]);
      f_q1_o      <= root.min1;
      r_o         <= root.has2 ? root.min2 - root.min1 : '1;
      reliable_o  <= root.has1 && (root.has2 ? (root.min2 - root.min1) > tht[LV] : 1'b1);
    end
  end

endmodule

// pe: one processing element of the SAD unit, computing sums of absolute differences
// (SADs) pixel-serially for SLOTS candidate windows.
//
// Structure: an AD circuit forms |ref - cand| and registers it (AD REG); an adder adds the
// registered AD to the partial sum of the selected slot, and a multiplexer chooses
// between that sum and the bare AD (the first step of a window starts from zero). The
// SLOTS partial-sum registers form a segment of a chain that runs through all PEs of the
// SAD unit: on a shift step every register takes the value of its left neighbour, the
// first one from the previous PE (sh_i) and the last one feeds the next PE (sh_o). This
// is how a partial SAD follows its candidate window while the PE's own candidate pixel
// column stays fixed.
//
// Timing: op_i, ref_i and cand_i are sampled together (step 1, AD register); the
// partial-sum update happens one cycle later (step 2). snap_o is high in the cycle in
// which an OP_SNAP reaches step 2; acc_o then holds the finished SADs.
//
// The AD circuit, AD register, adder, multiplexer, partial-sum registers with
// neighbour links and output multiplexer follow the document's PE diagram. The op
// encoding, the one-directional use of the neighbour links and the pipelining of the
// op with the data are this design's own choices.
module pe
  import stereo_pkg::*;
#(
  parameter int unsigned SLOTS = 1,   // candidate windows per PE (M/n)
  parameter int unsigned SAD_W = 18,
  localparam int unsigned KW   = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  op_kind_e             op_i,
  input  logic [KW-1:0]        k_i,       // slot addressed by OP_ACC
  input  logic                 first_i,   // OP_ACC starts a new sum
  input  pix_t                 ref_i,     // broadcast reference pixel
  input  pix_t                 cand_i,    // pixel from this PE's candidate memory module
  input  logic [SAD_W-1:0]     sh_i,      // from the previous PE's last slot
  output logic [SAD_W-1:0]     sh_o,      // to the next PE's first slot
  output logic [SAD_W-1:0]     acc_o [SLOTS],
  output logic                 snap_o
);

  // step 1: AD circuit and AD register
  pix_t          ad_q;
  op_kind_e      op_q;
  logic [KW-1:0] k_q;
  logic          first_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ad_q    <= '0;
      op_q    <= OP_NOP;
      k_q     <= '0;
      first_q <= 1'b0;
    end else begin
      ad_q    <= (ref_i > cand_i) ? pix_t'(ref_i - cand_i) : pix_t'(cand_i - ref_i);
      op_q    <= op_i;
      k_q     <= k_i;
      first_q <= first_i;
    end
  end

  // step 2: output MUX, adder, input MUX, partial-sum registers
  logic [SAD_W-1:0] acc [SLOTS];
  logic [SAD_W-1:0] sel, sum;

  always_comb begin
    sel = acc[k_q];
    sum = first_q ? SAD_W'(ad_q) : sel + SAD_W'(ad_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SLOTS; s++) acc[s] <= '0;
    end else begin
      unique case (op_q)
        OP_ACC:   acc[k_q] <= sum;
        OP_SHIFT: begin
          acc[0] <= sh_i;
          for (int s = 1; s < SLOTS; s++) acc[s] <= acc[s-1];
        end
        default: ;
      endcase
    end
  end

  assign sh_o   = acc[SLOTS-1];
  assign acc_o  = acc;
  assign snap_o = (op_q == OP_SNAP);

endmodule

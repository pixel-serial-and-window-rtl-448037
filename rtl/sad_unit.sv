// sad_unit: the window-parallel SAD unit. N_PE identical PEs work in lock step on the
// same op; one reference pixel is broadcast to all of them over a shared bus, and PE p
// receives the pixel of its own candidate memory module (cand_i[p]). Each PE owns
// M/N_PE consecutive candidate positions, so the unit holds M partial SADs, numbered
// slot s = p*(M/N_PE) + k. The partial-sum registers of all PEs form one chain; an
// OP_SHIFT moves slot s into slot s+1, and slot 0 takes zero.
//
// Timing: an op on op_i updates the partial sums at the second clock edge (see pe).
// snap_o, one cycle after OP_SNAP on op_i, marks the cycle in which sad_o holds the M
// finished SADs of one window size.
//
// The PE array, the broadcast reference bus and the one-module-per-PE candidate
// connection follow the document's block diagram of the SAD unit. Feeding zero into
// the start of the chain is this design's own choice.
module sad_unit
  import stereo_pkg::*;
#(
  parameter int unsigned M     = 512,  // candidate windows on an epipolar line (image width)
  parameter int unsigned N_PE  = 512,  // processing elements
  parameter int unsigned SAD_W = 18,
  localparam int unsigned SLOTS = M / N_PE,
  localparam int unsigned KW    = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  op_kind_e         op_i,
  input  logic [KW-1:0]    k_i,
  input  logic             first_i,
  input  pix_t             ref_i,
  input  pix_t             cand_i [N_PE],
  output logic [SAD_W-1:0] sad_o [M],
  output logic             snap_o
);

  logic [SAD_W-1:0] chain [N_PE+1];
  logic [N_PE-1:0]  snap;

  assign chain[0] = '0;

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    logic [SAD_W-1:0] acc [SLOTS];
    pe #(.SLOTS(SLOTS), .SAD_W(SAD_W)) u_pe (
      .clk, .rst_n,
      .op_i, .k_i, .first_i, .ref_i,
      .cand_i (cand_i[p]),
      .sh_i   (chain[p]),
      .sh_o   (chain[p+1]),
      .acc_o  (acc),
      .snap_o (snap[p])
    );
    for (genvar k = 0; k < SLOTS; k++) begin : g_slot
      assign sad_o[p*SLOTS + k] = acc[k];
    end
  end

  // all PEs see the same op stream, so any one of them tells when the window is done
  assign snap_o = snap[0];

endmodule

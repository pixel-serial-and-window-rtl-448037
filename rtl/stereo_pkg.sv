// stereo_pkg: types and constants shared by the variable-window stereo matching
// processor. A pixel is an 8-bit gray level (256-level images). The PEs of the SAD
// unit are driven by a stream of operations, one per control step; the op kind says
// whether the step accumulates an absolute difference, shifts the chain of partial
// sums one candidate position to the right, or marks the end of a window so that the
// minimum-value unit samples the finished SADs.
package stereo_pkg;

  localparam int unsigned PIX_W = 8;      // 256-level gray scale

  typedef logic [PIX_W-1:0] pix_t;

  typedef enum logic [1:0] {
    OP_NOP   = 2'd0,   // idle step
    OP_ACC   = 2'd1,   // one absolute difference per PE, added into slot k
    OP_SHIFT = 2'd2,   // move every partial SAD one candidate position to the right
    OP_SNAP  = 2'd3    // all SADs of the current window size are complete
  } op_kind_e;

  // Width of the sum of W_MAX*W_MAX absolute differences of PIX_W-bit pixels.
  function automatic int unsigned sad_width(int unsigned w_max);
    return PIX_W + $clog2(w_max * w_max);
  endfunction

endpackage

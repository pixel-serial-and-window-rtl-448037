// image_memory_model: behavioural model of one external image memory (frame store)
// used by the testbenches; it is not part of the processor. It holds an IMG_W x IMG_H
// 8-bit image and answers a read request with the pixel on the next clock edge. The
// testbench fills mem directly before the processor is started.
module image_memory_model
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512,
  localparam int unsigned XW = $clog2(IMG_W),
  localparam int unsigned YW = $clog2(IMG_H)
) (
  input  logic          clk,
  input  logic          req,
  input  logic [XW-1:0] x,
  input  logic [YW-1:0] y,
  output pix_t          data
);
  pix_t mem [IMG_H][IMG_W];
  always_ff @(posedge clk) begin
    if (req) data <= mem[y][x];
  end
endmodule

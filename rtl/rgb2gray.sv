// rgb2gray: RGB (24-bit) to grayscale (8-bit) converter.
//
// Computes gray = (77*R + 150*G + 29*B) / 256, an integer approximation of
// the ITU-R BT.601 luma weights (0.299, 0.587, 0.114). The weights sum to 256,
// so white (255,255,255) maps to 255 and no saturation is needed. The
// conversion itself is required by the design; the weights are this design's
// own choice.
//
// Timing: the result is registered on the rising clock edge when ce is high,
// one enable after the input pixel was sampled.
module rgb2gray (
  input  logic          clk,
  input  logic          ce,
  input  bgs_pkg::rgb_t rgb,
  output bgs_pkg::gray_t gray
);

  import bgs_pkg::*;

  logic [15:0] luma;  // gray * 256; the low byte is the dropped fraction

  always_comb begin
    luma = 16'(GRAY_WR) * 16'(rgb.r)
         + 16'(GRAY_WG) * 16'(rgb.g)
         + 16'(GRAY_WB) * 16'(rgb.b);
  end

  always_ff @(posedge clk) begin
    if (ce) gray <= luma[15:8];
  end

endmodule

// bgs_compare: background subtraction, threshold and back conversion.
//
// For a pixel inside the region of interest it forms the absolute difference
// d = |gray - bg| between the current gray pixel and the stored background
// pixel and compares it with the threshold th:
//   fg   = (d > th)            foreground flag (1 = object present)
//   y    = fg ? d : 0          8-bit result
// and converts the 8-bit result back to a 24-bit video pixel by copying it
// to R, G and B. Pixels outside the region of interest (valid low) are
// output black with fg = 0, so only the ROI is displayed.
// The binary decision follows the usual BGS rule (1 above the threshold, 0
// below); keeping the difference value rather than a constant white for
// foreground pixels is this design's reading of the 8-bit result that is
// back-converted, and makes an empty (all-zero) background show the input.
// A difference equal to the threshold counts as background.
//
// Timing: outputs registered on the rising clock edge when ce is high;
// synchronous reset clears them (black, fg = 0).
module bgs_compare (
  input  logic           clk,
  input  logic           rst,     // synchronous, active high
  input  logic           ce,
  input  logic           valid,   // pixel belongs to the ROI being read
  input  bgs_pkg::gray_t gray,    // current pixel
  input  bgs_pkg::gray_t bg,      // background pixel from BRAM
  input  bgs_pkg::gray_t th,      // threshold
  output logic           fg,      // foreground flag
  output bgs_pkg::rgb_t  rgb_out  // back-converted 24-bit result
);

  import bgs_pkg::*;

  gray_t diff, y;
  logic  over;

  always_comb begin
    diff = (gray >= bg) ? gray - bg : bg - gray;
    over = valid && (diff > th);
    y    = over ? diff : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fg      <= 1'b0;
      rgb_out <= '0;
    end else if (ce) begin
      fg      <= over;
      rgb_out <= '{r: y, g: y, b: y};
    end
  end

endmodule

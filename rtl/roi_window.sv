// roi_window: EN-ROI generator.
//
// Tracks the position of each incoming pixel inside the active picture and
// raises en_roi for the pixels of the region of interest: ROI_W pixels
// starting at column ROI_X0 on ROI_H lines starting at active line ROI_Y0.
// Column = number of active pixels already seen on the current line; line =
// number of active lines already completed since the last Vsync. The 90x90
// ROI size follows the design description; its position (centred in the
// 1280x720 frame by default) is this design's own choice.
//
// Timing: all registers advance only when ce is high (once per pixel
// period). en_roi, hpos and vpos are registered with the sampled pixel, so
// they describe the pixel that was on the inputs at that ce edge.
module roi_window #(
  parameter int unsigned HW     = 11,   // column counter width (1280 pixels)
  parameter int unsigned VW     = 10,   // line counter width (720 lines)
  parameter int unsigned ROI_X0 = bgs_pkg::ROI_X0_DEF,
  parameter int unsigned ROI_Y0 = bgs_pkg::ROI_Y0_DEF,
  parameter int unsigned ROI_W  = bgs_pkg::ROI_W_DEF,
  parameter int unsigned ROI_H  = bgs_pkg::ROI_H_DEF
) (
  input  logic          clk,
  input  logic          rst,     // synchronous, active high
  input  logic          ce,      // one pulse per pixel period
  input  logic          vsync,   // active high
  input  logic          de,      // active line (pixel valid)
  output logic          en_roi,  // sampled pixel lies inside the ROI
  output logic [HW-1:0] hpos,    // column of the sampled pixel
  output logic [VW-1:0] vpos     // active line of the sampled pixel
);

  logic [HW-1:0] hcnt;
  logic [VW-1:0] vcnt;
  logic          de_prev;
  logic          in_cols, in_rows;

  always_comb begin
    in_cols = ({1'b0, hcnt} >= (HW+1)'(ROI_X0)) && ({1'b0, hcnt} < (HW+1)'(ROI_X0 + ROI_W));
    in_rows = ({1'b0, vcnt} >= (VW+1)'(ROI_Y0)) && ({1'b0, vcnt} < (VW+1)'(ROI_Y0 + ROI_H));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcnt    <= '0;
      vcnt    <= '0;
      de_prev <= 1'b0;
      en_roi  <= 1'b0;
      hpos    <= '0;
      vpos    <= '0;
    end else if (ce) begin
      de_prev <= de;
      en_roi  <= de && in_cols && in_rows;
      hpos    <= hcnt;
      vpos    <= vcnt;
      // column counter: counts active pixels of the current line
      if (de)
        hcnt <= (hcnt == '1) ? hcnt : hcnt + 1'b1;
      else
        hcnt <= '0;
      // line counter: counts completed active lines since Vsync
      if (vsync)
        vcnt <= '0;
      else if (de_prev && !de && vcnt != '1)
        vcnt <= vcnt + 1'b1;
    end
  end

endmodule

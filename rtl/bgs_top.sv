// bgs_top: real-time background subtraction on a region of interest.
//
// A fixed camera (here: a 1280x720, 60 frames/s HDMI source, 74.25 MHz pixel
// clock) delivers RGB pixels. Inside a 90x90-pixel region of interest (ROI)
// every pixel is converted to 8-bit gray and compared with a reference
// (background) image held in an 8100-byte block RAM; pixels that differ by
// more than a threshold are shown, the rest of the ROI is black, and the
// picture outside the ROI is blanked. Raising the update switch sw0 makes
// the next frame's ROI the new background: the controller writes it into the
// BRAM in one frame, then returns to reading at the following Vsync.
//
// Per pixel, in one pixel period (three cycles of clk = 3x pixel clock):
//   cycle edge 0 (pix_ce)  : sample pixel and syncs, locate it (roi_window)
//   cycle edge 1           : RGB -> gray, read background pixel from BRAM
//   cycle edge 2           : |gray - bg| > th, 8 -> 24-bit, drive outputs;
//                            on a load pass write gray into BRAM; controller
//                            and address counter step
// The source must present a new pixel once per pixel period and hold it
// across the edge on which pix_ce is high (it may change on that edge).
// Outputs change on edge 2, i.e. two clk cycles (2/3 of a pixel period)
// after the pixel was sampled, and hold for a full pixel period: seen from
// the pixel clock, the latency is one pixel period (13.468 ns at 74.25 MHz).
//
// Follows the design description: ROI size and BRAM organisation, the
// seven-state load/read controller, the binary address counter, the order of
// operations inside a pixel period and the one-pixel latency. Own choices:
// one 222.75 MHz clock with clock enables in place of three related clocks,
// the ROI position (centred), the grayscale weights, the threshold as an
// input port, the output format (difference value for foreground pixels,
// black elsewhere) and active-high syncs.
module bgs_top #(
  parameter int unsigned ROI_W  = bgs_pkg::ROI_W_DEF,
  parameter int unsigned ROI_H  = bgs_pkg::ROI_H_DEF,
  parameter int unsigned ROI_X0 = bgs_pkg::ROI_X0_DEF,
  parameter int unsigned ROI_Y0 = bgs_pkg::ROI_Y0_DEF,
  parameter int unsigned HW     = 11,  // column counter width
  parameter int unsigned VW     = 10,  // line counter width
  parameter int unsigned AW     = 13,  // BRAM address width
  parameter int unsigned CW     = 7    // row / pixel counter width
) (
  input  logic        clk,        // 3x pixel clock (222.75 MHz)
  input  logic        rst,        // synchronous, active high
  input  logic        sw0,        // background update switch (asynchronous)
  input  logic [7:0]  th,         // subtraction threshold
  // input video, one new pixel per pixel period
  input  logic        in_vsync,
  input  logic        in_hsync,
  input  logic        in_de,
  input  logic [23:0] in_rgb,     // {R, G, B}
  output logic        pix_ce,     // high in the cycle whose end samples the input
  // output video
  output logic        out_vsync,
  output logic        out_hsync,
  output logic        out_de,
  output logic [23:0] out_rgb,    // {R, G, B}
  output logic        out_fg,     // foreground flag of the output pixel
  output logic        w1_r0,      // 1 while a background load is pending/running
  output logic [2:0]  ctrl_state, // controller state (bgs_pkg::ctrl_state_t)
  output logic        pass_done   // high for one pixel period when a pass over the ROI ends
);

  import bgs_pkg::*;

  localparam int unsigned DEPTH = ROI_W * ROI_H;

  // sub-pixel sequencing
  logic ce_sample, ce_conv, ce_out;

  pixel_phase #(.PHASES(PHASES)) u_phase (
    .clk, .rst, .ce_sample, .ce_conv, .ce_out
  );

  assign pix_ce = ce_sample;

  // update switch synchroniser
  logic [1:0] sw0_sync;
  always_ff @(posedge clk) begin
    if (rst) sw0_sync <= '0;
    else     sw0_sync <= {sw0_sync[0], sw0};
  end

  // input sampling
  video_t vin, vid_q;
  assign vin = '{vsync: in_vsync, hsync: in_hsync, de: in_de, rgb: in_rgb};

  always_ff @(posedge clk) begin
    if (rst)            vid_q <= '0;
    else if (ce_sample) vid_q <= vin;
  end

  logic en_roi;

  roi_window #(
    .HW(HW), .VW(VW), .ROI_X0(ROI_X0), .ROI_Y0(ROI_Y0), .ROI_W(ROI_W), .ROI_H(ROI_H)
  ) u_roi (
    .clk, .rst, .ce(ce_sample), .vsync(in_vsync), .de(in_de),
    .en_roi, .hpos(), .vpos()
  );

  // grayscale conversion
  gray_t gray;

  rgb2gray u_gray (.clk, .ce(ce_conv), .rgb(vid_q.rgb), .gray);

  // load/read controller and address counter
  ctrl_state_t   state;
  logic          roi_active, addr_clr, addr_inc, bram_we;
  logic [AW-1:0] bram_addr;

  bram_wr_fsm #(.ROI_W(ROI_W), .ROI_H(ROI_H), .CW(CW)) u_fsm (
    .clk, .rst, .ce(ce_out), .sw0(sw0_sync[1]),
    .vsync(vid_q.vsync), .active_line(vid_q.de), .en_roi,
    .state, .w1_r0, .roi_active, .addr_clr, .addr_inc, .bram_we,
    .row_count(), .pixel_row(), .pass_done
  );

  addr_counter #(.AW(AW), .LAST(DEPTH - 1)) u_addr (
    .clk, .rst, .clr(addr_clr), .inc(addr_inc), .addr(bram_addr)
  );

  // background memory: read on edge 1, write on edge 2
  gray_t bg;

  bg_bram #(.DW(8), .DEPTH(DEPTH), .AW(AW)) u_bram (
    .clk,
    .en   ((ce_conv && roi_active) || bram_we),
    .we   (bram_we),
    .addr (bram_addr),
    .din  (gray),
    .dout (bg)
  );

  // subtraction, threshold, back conversion
  rgb_t rgb_res;

  bgs_compare u_cmp (
    .clk, .rst, .ce(ce_out), .valid(roi_active), .gray, .bg, .th,
    .fg(out_fg), .rgb_out(rgb_res)
  );

  assign out_rgb    = rgb_res;
  assign ctrl_state = state;

  // output syncs, aligned with the result
  always_ff @(posedge clk) begin
    if (rst) begin
      out_vsync <= 1'b0;
      out_hsync <= 1'b0;
      out_de    <= 1'b0;
    end else if (ce_out) begin
      out_vsync <= vid_q.vsync;
      out_hsync <= vid_q.hsync;
      out_de    <= vid_q.de;
    end
  end

  initial assert (DEPTH <= (1 << AW)) else $error("bgs_top: AW too small for the ROI");

endmodule

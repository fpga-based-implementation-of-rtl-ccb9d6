// bgs_pkg: types and constants shared by the background-subtraction (BGS) design.
//
// The design works on a native parallel video stream (24-bit RGB pixel plus
// Vsync, Hsync and a data-enable "active line" flag), converts each pixel to
// 8-bit gray, and compares a 90x90-pixel region of interest (ROI) against a
// reference image held in on-chip block RAM. The pixel rate of 74.25 MHz
// (1280x720 at 60 frames/s) and the 90x90 ROI follow the design description;
// the RGB bit order {R,G,B} is this design's own choice.
package bgs_pkg;

  // Video and ROI sizes of the reference configuration.
  localparam int unsigned H_ACTIVE_DEF = 1280;  // pixels per active line
  localparam int unsigned V_ACTIVE_DEF = 720;   // active lines per frame
  localparam int unsigned ROI_W_DEF    = 90;    // ROI width in pixels
  localparam int unsigned ROI_H_DEF    = 90;    // ROI height in lines
  // ROI position: centred in the 1280x720 frame (own choice).
  localparam int unsigned ROI_X0_DEF   = (H_ACTIVE_DEF - ROI_W_DEF) / 2;  // 595
  localparam int unsigned ROI_Y0_DEF   = (V_ACTIVE_DEF - ROI_H_DEF) / 2;  // 315

  // Number of fast-clock sub-cycles in one pixel period (222.75 MHz / 74.25 MHz).
  localparam int unsigned PHASES = 3;

  typedef logic [7:0] gray_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // One pixel of the native video stream.
  typedef struct packed {
    logic vsync;   // vertical sync, active high
    logic hsync;   // horizontal sync, active high
    logic de;      // active line: pixel data valid
    rgb_t rgb;
  } video_t;

  // States of the load/read controller (seven states).
  typedef enum logic [2:0] {
    S_WAIT_SW0   = 3'd0,  // wait for the update switch to be released
    S_W1R0_VSYNC = 3'd1,  // wait for Vsync, then start a write or a read frame
    S_WRITE      = 3'd2,  // write ROI pixels of the current line into BRAM
    S_WAIT_LINE  = 3'd3,  // wait for the end of the active line
    S_CHECK_W    = 3'd4,  // all ROI rows written?
    S_READ       = 3'd5,  // read ROI pixels of the current line from BRAM
    S_CHECK_R    = 3'd6   // all ROI rows read?
  } ctrl_state_t;

  // Grayscale weights (BT.601 luma in 1/256 units, sum 256).
  localparam int unsigned GRAY_WR = 77;
  localparam int unsigned GRAY_WG = 150;
  localparam int unsigned GRAY_WB = 29;

endpackage

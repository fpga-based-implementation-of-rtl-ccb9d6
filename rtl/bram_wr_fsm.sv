// bram_wr_fsm: controller for loading and reading the ROI in/from BRAM.
//
// Seven-state machine that decides, frame by frame, whether the ROI pixels
// are written into the background memory (load, W1_R0 = 1) or read from it
// for the subtraction (W1_R0 = 0):
//   WAIT_SW0   : while the update switch sw0 is high, W1_R0 is set; when sw0
//                is low, go on to wait for Vsync.
//   W1R0_VSYNC : on Vsync clear the address counter, the row and pixel
//                counters and start a write pass (W1_R0 = 1) or a read pass.
//   WRITE/READ : every ROI pixel (en_roi) writes or reads one BRAM location;
//                after ROI_W pixels of the line go to WAIT_LINE.
//   WAIT_LINE  : clear the pixel counter; at the end of the active line
//                count the row and go to CHECK_W or CHECK_R.
//   CHECK_W/R  : fewer than ROI_H rows done -> back to WRITE/READ; otherwise
//                the pass is over. After a write pass W1_R0 returns to 0, so
//                reading starts at the next Vsync.
// The states, the W1_R0 flag and the row/pixel counters follow the design
// description. Own choices: a press of sw0 seen in any state is remembered
// and served at the next frame start; a rising Vsync edge in the middle of a
// pass (frame shorter than the ROI) abandons the pass and restarts it at that
// Vsync.
//
// Timing: the state advances only on clock edges with ce high (once per
// pixel period, after the pixel has been converted and read). addr_inc and
// bram_we are already qualified with ce; roi_active is not, so it can enable
// the BRAM read earlier in the same pixel period.
module bram_wr_fsm #(
  parameter int unsigned ROI_W = bgs_pkg::ROI_W_DEF,
  parameter int unsigned ROI_H = bgs_pkg::ROI_H_DEF,
  parameter int unsigned CW    = 7    // width of the row and pixel counters
) (
  input  logic                 clk,
  input  logic                 rst,         // synchronous, active high
  input  logic                 ce,          // one step per pixel period
  input  logic                 sw0,         // background update request
  input  logic                 vsync,       // active high
  input  logic                 active_line, // data enable of the sampled pixel
  input  logic                 en_roi,      // sampled pixel lies in the ROI
  output bgs_pkg::ctrl_state_t state,
  output logic                 w1_r0,       // 1: load background, 0: read
  output logic                 roi_active,  // current pixel is written or read
  output logic                 addr_clr,    // restart the BRAM address
  output logic                 addr_inc,    // advance the BRAM address
  output logic                 bram_we,     // write the current pixel
  output logic [CW-1:0]        row_count,   // ROI rows done in this pass
  output logic [CW-1:0]        pixel_row,   // ROI pixels done on this line
  output logic                 pass_done    // pulse: a full pass has ended
);

  import bgs_pkg::*;

  logic load_req;
  logic vsync_prev;
  logic vs_rise;
  logic in_pass;

  always_comb begin
    vs_rise    = vsync && !vsync_prev;
    in_pass    = (state == S_WRITE) || (state == S_READ);
    roi_active = in_pass && en_roi;
    addr_clr   = ce && (state == S_W1R0_VSYNC) && !sw0 && vsync;
    addr_inc   = ce && roi_active;
    bram_we    = addr_inc && (state == S_WRITE);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_WAIT_SW0;
      w1_r0      <= 1'b0;
      load_req   <= 1'b0;
      vsync_prev <= 1'b0;
      row_count  <= '0;
      pixel_row  <= '0;
      pass_done  <= 1'b0;
    end else if (ce) begin
      vsync_prev <= vsync;
      pass_done  <= 1'b0;
      if (sw0) load_req <= 1'b1;

      if (vs_rise && state != S_WAIT_SW0 && state != S_W1R0_VSYNC) begin
        // frame ended before the pass: start over at this Vsync
        state <= S_W1R0_VSYNC;
      end else begin
        unique case (state)
          S_WAIT_SW0: begin
            if (sw0) begin
              w1_r0 <= 1'b1;
            end else begin
              state <= S_W1R0_VSYNC;
            end
          end
          S_W1R0_VSYNC: begin
            if (sw0) begin
              state <= S_WAIT_SW0;
            end else if (vsync) begin
              row_count <= '0;
              pixel_row <= '0;
              load_req  <= 1'b0;
              if (load_req) w1_r0 <= 1'b1;
              state <= (w1_r0 || load_req) ? S_WRITE : S_READ;
            end
          end
          S_WRITE, S_READ: begin
            if (en_roi) begin
              pixel_row <= pixel_row + 1'b1;
              if (pixel_row == CW'(ROI_W - 1)) state <= S_WAIT_LINE;
            end
          end
          S_WAIT_LINE: begin
            pixel_row <= '0;
            if (!active_line) begin
              row_count <= row_count + 1'b1;
              state     <= w1_r0 ? S_CHECK_W : S_CHECK_R;
            end
          end
          S_CHECK_W: begin
            if (row_count < CW'(ROI_H)) begin
              state <= S_WRITE;
            end else begin
              w1_r0     <= 1'b0;
              pass_done <= 1'b1;
              state     <= S_WAIT_SW0;
            end
          end
          S_CHECK_R: begin
            if (row_count < CW'(ROI_H)) begin
              state <= S_READ;
            end else begin
              pass_done <= 1'b1;
              state     <= S_WAIT_SW0;
            end
          end
          default: state <= S_WAIT_SW0;
        endcase
      end
    end
  end

  // The counters must be able to hold ROI_W and ROI_H.
  initial assert (ROI_W < (1 << CW) && ROI_H < (1 << CW))
    else $error("bram_wr_fsm: CW too small for the ROI");

endmodule

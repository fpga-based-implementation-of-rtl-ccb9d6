// pixel_phase: sub-pixel timing sequencer.
//
// The subsystem performs all per-pixel operations inside one pixel period by
// using a clock that is a multiple of the pixel clock. This design runs from
// the fastest of those clocks (3x the pixel clock, 222.75 MHz for a 74.25 MHz
// pixel clock) and divides each pixel period into PHASES sub-cycles with a
// modulo counter. Each output is a one-cycle clock enable that marks the
// rising edge of clk on which a stage acts:
//   ce_sample : last edge of sub-cycle 0 - input pixel sampled, address/ROI
//               counters evaluated (one per pixel period)
//   ce_conv   : edge of sub-cycle 1      - grayscale conversion, BRAM read
//   ce_out    : edge of sub-cycle 2      - subtraction, threshold, 8->24-bit
//               back conversion, BRAM write, controller step
// Using enables on one clock instead of three clocks is this design's own
// choice; it keeps the order of operations of the original per-pixel timing
// while staying in a single clock domain.
//
// Timing: after reset, ce_sample is high in the first cycle, then every
// PHASES cycles; exactly one enable is high in each cycle.
module pixel_phase #(
  parameter int unsigned PHASES = bgs_pkg::PHASES
) (
  input  logic clk,
  input  logic rst,        // synchronous, active high
  output logic ce_sample,
  output logic ce_conv,
  output logic ce_out
);

  localparam int unsigned PW = (PHASES > 1) ? $clog2(PHASES) : 1;

  logic [PW-1:0] phase;

  always_ff @(posedge clk) begin
    if (rst)
      phase <= '0;
    else if (phase == PW'(PHASES - 1))
      phase <= '0;
    else
      phase <= phase + 1'b1;
  end

  always_comb begin
    ce_sample = (phase == '0);
    ce_conv   = (phase == PW'(1));
    ce_out    = (phase == PW'(PHASES - 1));
  end

  initial assert (PHASES >= 3) else $error("pixel_phase needs at least 3 sub-cycles");

endmodule

// addr_counter: binary counter that provides the BRAM address.
//
// During a load (write) or read pass over the region of interest the address
// starts at 0 and advances by one for every ROI pixel, so that ROI row r,
// column c lands at address r*ROI_W + c (row 1 at 0x000-0x059, row 90 at
// 0x1F4A-0x1FA3 for a 90x90 ROI). The controller clears the counter at the
// start of each frame pass and pulses inc once per ROI pixel.
//
// Interface: clr has priority over inc; both act on the rising clock edge.
// The counter wraps to 0 after LAST (the last valid address) instead of
// running past the memory, which is this design's own choice.
module addr_counter #(
  parameter int unsigned AW   = 13,
  parameter int unsigned LAST = 8099
) (
  input  logic          clk,
  input  logic          rst,   // synchronous, active high
  input  logic          clr,   // restart at address 0
  input  logic          inc,   // advance by one
  output logic [AW-1:0] addr
);

  always_ff @(posedge clk) begin
    if (rst || clr)
      addr <= '0;
    else if (inc)
      addr <= (addr == AW'(LAST)) ? '0 : addr + 1'b1;
  end

endmodule

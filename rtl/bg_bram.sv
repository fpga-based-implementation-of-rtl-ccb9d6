// bg_bram: background (reference) image memory.
//
// Single-port block RAM holding one byte (one 8-bit gray pixel) per location,
// DEPTH = 90*90 = 8100 locations for the 90x90 region of interest, addressed
// by a 13-bit address. Written as an array so that FPGA tools map it to block
// RAM. The memory starts cleared (all pixels black), so that before the first
// background load the subtraction returns the input image itself.
//
// Timing: synchronous read and write on the rising clock edge when en is
// high; read-first: dout gets the old contents when a location is written.
// dout holds its value while en is low.
module bg_bram #(
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 8100,
  parameter int unsigned AW    = 13
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);

  logic [DW-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      dout <= mem[addr];
      if (we) mem[addr] <= din;
    end
  end

endmodule

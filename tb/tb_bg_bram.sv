// tb_bg_bram: checks the 8100 x 8-bit background memory. First every
// location must read 0 (cleared memory), then random reads and writes are
// compared with a reference array, with the read-first rule when the same
// location is read and written, and with dout held while en is low.
module tb_bg_bram;
  localparam int DEPTH = 8100;
  logic clk = 1'b0;
  logic en = 1'b0, we = 1'b0;
  logic [12:0] addr = '0;
  logic [7:0] din = '0, dout;
  logic [7:0] model [DEPTH];
  logic [7:0] expect_q;
  int checks = 0, failures = 0;

  bg_bram dut (.clk, .en, .we, .addr, .din, .dout);

  always #2 clk = ~clk;

  task automatic check(input logic [7:0] exp_v, input string what);
    checks++;
    if (dout !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: dout=%h expected %h", what, dout, exp_v);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    // all locations cleared
    for (int a = 0; a < DEPTH; a++) begin
      en <= 1'b1; we <= 1'b0; addr <= 13'(a);
      @(posedge clk); #1;
      check(8'h00, "initial contents");
    end
    // random traffic
    for (int i = 0; i < 30000; i++) begin
      automatic int a = $urandom_range(0, DEPTH - 1);
      automatic logic w = $urandom_range(0, 1) == 1;
      automatic logic e = $urandom_range(0, 7) != 0;
      automatic logic [7:0] d = 8'($urandom);
      en <= e; we <= w; addr <= 13'(a); din <= d;
      expect_q = e ? model[a] : dout;  // read-first, or hold
      @(posedge clk); #1;
      check(expect_q, e ? "read" : "hold");
      if (e && w) model[a] = d;
    end
    en <= 1'b0; we <= 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

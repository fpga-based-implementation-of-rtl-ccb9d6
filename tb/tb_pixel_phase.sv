// tb_pixel_phase: checks the sub-pixel sequencer. After reset the three
// enables must be one-hot in every cycle and repeat with period 3, in the
// order sample, conv, out, starting with sample in the first cycle.
module tb_pixel_phase;
  logic clk = 1'b0, rst = 1'b1;
  logic ce_sample, ce_conv, ce_out;
  int checks = 0, failures = 0;

  pixel_phase dut (.clk, .rst, .ce_sample, .ce_conv, .ce_out);

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);  // first cycle after reset
    for (int i = 0; i < 60; i++) begin
      check(ce_sample == (i % 3 == 0), "ce_sample");
      check(ce_conv   == (i % 3 == 1), "ce_conv");
      check(ce_out    == (i % 3 == 2), "ce_out");
      check($countones({ce_sample, ce_conv, ce_out}) == 1, "one-hot");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

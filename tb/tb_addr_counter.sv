// tb_addr_counter: drives random clear/increment requests into the BRAM
// address counter (13 bits, last address 8099) and compares it with a
// reference count every cycle, including the wrap from 8099 to 0.
module tb_addr_counter;
  localparam int LAST = 8099;
  logic clk = 1'b0, rst = 1'b1;
  logic clr = 1'b0, inc = 1'b0;
  logic [12:0] addr;
  int checks = 0, failures = 0, model = 0, wraps = 0, clears = 0;

  addr_counter dut (.clk, .rst, .clr, .inc, .addr);

  always #2 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 40000; i++) begin
      // mostly increments, rare clears, so that the wrap is reached
      clr <= ($urandom_range(0, 9999) == 0) && (i > 20000);
      inc <= ($urandom_range(0, 9) != 0);
      @(posedge clk);
      #1;
      if (clr) begin
        model = 0;
        clears++;
      end else if (inc) begin
        if (model == LAST) begin
          model = 0;
          wraps++;
        end else model++;
      end
      checks++;
      if (int'(addr) != model) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%0d expected %0d", addr, model);
      end
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL: wrap never exercised");
    end
    $display("wraps=%0d clears=%0d", wraps, clears);
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

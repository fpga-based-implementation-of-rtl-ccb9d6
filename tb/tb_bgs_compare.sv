// tb_bgs_compare: checks subtraction, threshold and back conversion with
// random gray/background/threshold values and the edge cases d == th,
// d == th + 1 and pixels outside the ROI (valid low -> black).
module tb_bgs_compare;
  import bgs_pkg::*;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b0, valid = 1'b0;
  gray_t gray = '0, bg = '0, th = '0;
  logic fg;
  rgb_t rgb_out;
  int checks = 0, failures = 0, n_fg = 0, n_bg = 0, n_out = 0;

  bgs_compare dut (.clk, .rst, .ce, .valid, .gray, .bg, .th, .fg, .rgb_out);

  always #2 clk = ~clk;

  task automatic apply(input logic v, input int gi, input int bi, input int ti);
    int d, y;
    logic f;
    valid <= v; gray <= 8'(gi); bg <= 8'(bi); th <= 8'(ti); ce <= 1'b1;
    @(posedge clk); #1;
    d = (gi > bi) ? gi - bi : bi - gi;
    f = v && (d > ti);
    y = f ? d : 0;
    if (!v) n_out++; else if (f) n_fg++; else n_bg++;
    checks++;
    if (fg !== f || rgb_out !== {8'(y), 8'(y), 8'(y)}) begin
      failures++;
      if (failures < 10)
        $display("FAIL v=%0b gray=%0d bg=%0d th=%0d: fg=%0b rgb=%h expected %0b %0d",
                 v, gi, bi, ti, fg, rgb_out, f, y);
    end
  endtask

  initial begin
    int rv, rg, rb, rt;
    ce <= 1'b1;
    @(posedge clk); #1;
    checks++;
    if (fg !== 1'b0 || rgb_out !== '0) begin
      failures++;
      $display("FAIL reset value");
    end
    rst <= 1'b0;
    apply(1'b1, 100, 60, 40);   // d == th: background
    apply(1'b1, 60, 100, 39);   // d == th + 1: foreground, bg above gray
    apply(1'b1, 255, 0, 0);
    apply(1'b1, 0, 255, 254);
    apply(1'b0, 255, 0, 0);     // outside ROI
    for (int i = 0; i < 5000; i++) begin
      rv = $urandom_range(0, 7);
      rg = $urandom_range(0, 255);
      rb = $urandom_range(0, 255);
      rt = $urandom_range(0, 120);
      apply(rv != 0, rg, rb, rt);
    end
    checks++;
    if (n_fg == 0 || n_bg == 0 || n_out == 0) begin
      failures++;
      $display("FAIL: a case never occurred fg=%0d bg=%0d out=%0d", n_fg, n_bg, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

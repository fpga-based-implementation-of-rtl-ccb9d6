// tb_rgb2gray: checks the RGB to gray converter against the BT.601 luma
// 0.299 R + 0.587 G + 0.114 B computed in floating point (the truncated
// 8-bit result must lie within 1.5 below and 0.5 above it), plus exact
// values for black, white and the primaries, and that the output only
// changes on clock edges with ce high.
module tb_rgb2gray;
  import bgs_pkg::*;
  logic clk = 1'b0, ce = 1'b0;
  rgb_t rgb = '0;
  gray_t gray;
  int checks = 0, failures = 0;

  rgb2gray dut (.clk, .ce, .rgb, .gray);

  always #2 clk = ~clk;

  task automatic convert(input rgb_t px, output gray_t g);
    rgb <= px; ce <= 1'b1;
    @(posedge clk); #1;
    g = gray;
  endtask

  task automatic check_exact(input rgb_t px, input int exp_v);
    gray_t g;
    convert(px, g);
    checks++;
    if (int'(g) != exp_v) begin
      failures++;
      $display("FAIL rgb=%h gray=%0d expected %0d", px, g, exp_v);
    end
  endtask

  initial begin
    gray_t g, g_old;
    rgb_t px;
    real ref_v;
    check_exact('{r: 8'd0,   g: 8'd0,   b: 8'd0},   0);
    check_exact('{r: 8'd255, g: 8'd255, b: 8'd255}, 255);
    check_exact('{r: 8'd255, g: 8'd0,   b: 8'd0},   76);   // 77*255/256
    check_exact('{r: 8'd0,   g: 8'd255, b: 8'd0},   149);  // 150*255/256
    check_exact('{r: 8'd0,   g: 8'd0,   b: 8'd255}, 28);   // 29*255/256
    for (int i = 0; i < 5000; i++) begin
      px = 24'($urandom);
      convert(px, g);
      ref_v = 0.299 * px.r + 0.587 * px.g + 0.114 * px.b;
      checks++;
      if (real'(g) < ref_v - 1.5 || real'(g) > ref_v + 0.5) begin
        failures++;
        if (failures < 10) $display("FAIL rgb=%h gray=%0d luma=%f", px, g, ref_v);
      end
    end
    // hold while ce is low
    g_old = gray;
    ce  <= 1'b0;
    rgb <= 24'hFFFFFF ^ {g_old, g_old, g_old};
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (gray != g_old) begin
      failures++;
      $display("FAIL output changed with ce low");
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

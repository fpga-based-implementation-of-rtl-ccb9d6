// tb_roi_window: feeds small video frames (8x6 active, blanking around it)
// to the EN-ROI generator with a clock enable every third cycle and compares
// en_roi, hpos and vpos with the pixel positions known to the generator,
// for a 4x3 ROI at column 3, line 2.
module tb_roi_window;
  localparam int H_ACT = 8, H_TOT = 12, V_ACT = 6, V_TOT = 10;
  localparam int X0 = 3, Y0 = 2, W = 4, H = 3;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b0, vsync = 1'b0, de = 1'b0;
  logic en_roi;
  logic [5:0] hpos;
  logic [4:0] vpos;
  int checks = 0, failures = 0, n_roi = 0;

  roi_window #(.HW(6), .VW(5), .ROI_X0(X0), .ROI_Y0(Y0), .ROI_W(W), .ROI_H(H)) dut (
    .clk, .rst, .ce, .vsync, .de, .en_roi, .hpos, .vpos
  );

  always #2 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    // frame layout: lines 0-1 Vsync, line 2 back porch, lines 3..3+V_ACT-1 active
    for (int f = 0; f < 3; f++) begin
      for (int l = 0; l < V_TOT; l++) begin
        for (int p = 0; p < H_TOT; p++) begin
          automatic int  y   = l - 3;
          automatic bit  act = (y >= 0) && (y < V_ACT) && (p < H_ACT);
          automatic bit  exp_roi = act && p >= X0 && p < X0 + W && y >= Y0 && y < Y0 + H;
          vsync <= (l < 2);
          de    <= act;
          // two idle cycles, then the enabled cycle samples the pixel
          ce <= 1'b0;
          repeat (2) @(posedge clk);
          ce <= 1'b1;
          @(posedge clk); #1;
          ce <= 1'b0;
          checks++;
          if (en_roi !== exp_roi || (act && (int'(hpos) != p || int'(vpos) != y))) begin
            failures++;
            if (failures < 10)
              $display("FAIL f=%0d line=%0d px=%0d en_roi=%0b exp=%0b hpos=%0d vpos=%0d",
                       f, l, p, en_roi, exp_roi, hpos, vpos);
          end
          if (exp_roi) n_roi++;
        end
      end
    end
    checks++;
    if (n_roi != 3 * W * H) begin
      failures++;
      $display("FAIL ROI pixel count %0d", n_roi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

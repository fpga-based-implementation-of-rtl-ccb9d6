// tb_bgs_top: end-to-end test of the background-subtraction subsystem, at a reduced
// frame and ROI size (24x16 frame, 6x5 ROI).
//
// A video source model produces 24x16 active frames (32 pixels per line,
// 21 lines per frame, Vsync on the first 2 lines) in step with pix_ce. The
// picture is a fixed pseudo-random background plus, in some frames, a solid
// object. Scenario:
//   frame 0 : background + object, read pass against the cleared memory:
//             ROI output equals the gray input wherever it exceeds th
//   frame 1 : background only, read pass; sw0 pressed and released during it
//   frame 2 : background with +-1 noise, load pass (W1_R0 high)
//   frame 3 : background with noise, read pass: whole ROI below threshold
//   frame 4 : background + another object: foreground only on the object
// A reference model (gray = (77R+150G+29B)/256, |gray-bg| > th, black outside
// the ROI) predicts every output pixel and sync. Latency is checked in clock
// cycles: the result of a pixel must not be visible two cycles after it is
// sampled and must be present three cycles (one pixel period) after.
// Each mechanism (read pass, load pass, update request, foreground pixel,
// background pixel, blanked pixel, pass end) is counted and must occur.
module tb_bgs_top;
  import bgs_pkg::*;

  localparam int H_ACT = 24, H_TOT = 32;
  localparam int VS = 2, BP = 2, V_ACT = 16, FP = 1;
  localparam int V_TOT = VS + BP + V_ACT + FP;
  localparam int ROI_W = 6, ROI_H = 5, ROI_X0 = 9, ROI_Y0 = 6;
  localparam int TH = 24;
  localparam int N_FRAMES = 5;

  logic clk = 1'b0, rst = 1'b1, sw0 = 1'b0;
  logic [7:0] th = 8'(TH);
  logic in_vsync = 1'b0, in_hsync = 1'b0, in_de = 1'b0;
  logic [23:0] in_rgb = '0;
  logic pix_ce, out_vsync, out_hsync, out_de, out_fg, w1_r0, pass_done;
  logic [23:0] out_rgb;
  logic [2:0] ctrl_state;

  bgs_top #(.ROI_W(6), .ROI_H(5), .ROI_X0(9), .ROI_Y0(6)) dut (
    .clk, .rst, .sw0, .th, .in_vsync, .in_hsync, .in_de, .in_rgb, .pix_ce,
    .out_vsync, .out_hsync, .out_de, .out_rgb, .out_fg, .w1_r0, .ctrl_state, .pass_done
  );

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  int n_read_px = 0, n_write_px = 0, n_fg = 0, n_bgpx = 0, n_blank = 0;
  int n_press = 0, n_pass_done = 0, n_w1 = 0, n_passthru = 0;
  logic [7:0] bg_model [ROI_W * ROI_H];

  // expected output of the pixel sampled last, and of the one before it
  typedef struct packed {
    logic vsync, hsync, de, fg;
    logic [23:0] rgb;
  } out_t;
  out_t exp_cur = '0, exp_prev = '0;

  function automatic logic [7:0] gray_of(input logic [23:0] c);
    return 8'((77 * int'(c[23:16]) + 150 * int'(c[15:8]) + 29 * int'(c[7:0])) >> 8);
  endfunction

  // fixed pseudo-random background picture
  function automatic logic [23:0] base_px(input int x, input int y);
    int unsigned h;
    h = 32'(x) * 32'd2654435761 ^ 32'(y) * 32'd40503 ^ 32'h5bd1e995;
    h = h ^ (h >> 13);
    h = h * 32'd1274126177;
    return 24'(h ^ (h >> 16));
  endfunction

  function automatic logic [7:0] nudge(input logic [7:0] v, input int d);
    int r;
    r = int'(v) + d;
    if (r < 0) r = 0;
    if (r > 255) r = 255;
    return 8'(r);
  endfunction

  function automatic logic [23:0] scene(input int f, input int x, input int y);
    logic [23:0] c;
    int d;
    c = base_px(x, y);
    if (f >= 2 && f <= 3) begin  // small sensor noise, at most 1 gray level
      d = ((x + y + f) % 3) - 1;
      c = {nudge(c[23:16], d), nudge(c[15:8], d), nudge(c[7:0], d)};
    end
    if (f == 0 && x >= ROI_X0 + ROI_W / 4 && x < ROI_X0 + ROI_W / 2 &&
        y >= ROI_Y0 && y < ROI_Y0 + ROI_H / 2)
      c = 24'hF0E0D0;
    if (f == 4 && x >= ROI_X0 + ROI_W / 2 && x < ROI_X0 + ROI_W &&
        y >= ROI_Y0 + ROI_H / 3 && y < ROI_Y0 + ROI_H)
      c = 24'h102030;
    return c;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // pass_done lasts one pixel period: count its rising edges
  logic pass_done_q = 1'b0;
  always @(posedge clk) begin
    pass_done_q <= pass_done;
    if (!rst && pass_done && !pass_done_q) n_pass_done++;
  end

  initial begin
    int phase;
    bit write_pass;
    foreach (bg_model[i]) bg_model[i] = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    // align to the sub-cycle that precedes a sampling edge
    do @(negedge clk); while (!pix_ce);
    for (int f = 0; f < N_FRAMES; f++) begin
      write_pass = (f == 2);
      for (int l = 0; l < V_TOT; l++) begin
        // update switch: pressed for a few lines inside the ROI of frame 1
        if (f == 1 && l == VS + BP + ROI_Y0 + 1) begin
          sw0 = 1'b1;
          n_press++;
        end
        if (f == 1 && l == VS + BP + ROI_Y0 + 3) sw0 = 1'b0;
        for (int p = 0; p < H_TOT; p++) begin
          automatic int  y   = l - VS - BP;
          automatic bit  act = (y >= 0) && (y < V_ACT) && (p < H_ACT);
          automatic bit  roi = act && p >= ROI_X0 && p < ROI_X0 + ROI_W &&
                               y >= ROI_Y0 && y < ROI_Y0 + ROI_H;
          automatic logic [23:0] c = act ? scene(f, p, y) : 24'h000000;
          automatic out_t e;
          // here pix_ce is high: the next rising edge samples the new pixel
          check(out_t'{out_vsync, out_hsync, out_de, out_fg, out_rgb} == exp_cur,
                $sformatf("output of previous pixel (frame %0d line %0d px %0d)", f, l, p));
          in_vsync = (l < VS);
          in_hsync = act ? 1'b0 : (p >= H_ACT + 2 && p < H_ACT + 4);
          in_de    = act;
          in_rgb   = c;
          // reference model
          e = '0;
          e.vsync = in_vsync;
          e.hsync = in_hsync;
          e.de    = in_de;
          if (roi) begin
            automatic int a = (y - ROI_Y0) * ROI_W + (p - ROI_X0);
            automatic int g = int'(gray_of(c));
            automatic int b = int'(bg_model[a]);
            automatic int d = (g > b) ? g - b : b - g;
            e.fg  = d > TH;
            e.rgb = e.fg ? {8'(d), 8'(d), 8'(d)} : 24'h0;
            if (e.fg) n_fg++; else n_bgpx++;
            if (e.fg && b == 0) n_passthru++;
            if (write_pass) begin
              bg_model[a] = 8'(g);
              n_write_px++;
            end else n_read_px++;
          end else begin
            n_blank++;
          end
          exp_prev = exp_cur;
          exp_cur  = e;
          if (w1_r0) n_w1++;
          // two cycles later the previous result must still be shown
          @(negedge clk);
          @(negedge clk);
          check(out_t'{out_vsync, out_hsync, out_de, out_fg, out_rgb} == exp_prev,
                "result appeared early");
          @(negedge clk);
          check(pix_ce == 1'b1, "pix_ce period");
        end
      end
    end
    check(out_t'{out_vsync, out_hsync, out_de, out_fg, out_rgb} == exp_cur, "last pixel");
    // every mechanism must have occurred
    check(n_read_px  == 4 * ROI_W * ROI_H, $sformatf("read pixels %0d", n_read_px));
    check(n_write_px == ROI_W * ROI_H, $sformatf("written pixels %0d", n_write_px));
    check(n_pass_done == N_FRAMES, $sformatf("passes completed %0d", n_pass_done));
    check(n_press > 0 && n_w1 > 0, "update request / W1_R0");
    check(n_fg > 0 && n_bgpx > 0 && n_blank > 0 && n_passthru > 0,
          $sformatf("fg=%0d bg=%0d blank=%0d passthru=%0d", n_fg, n_bgpx, n_blank, n_passthru));
    $display("read_px=%0d write_px=%0d fg=%0d bg=%0d blank=%0d passes=%0d presses=%0d",
             n_read_px, n_write_px, n_fg, n_bgpx, n_blank, n_pass_done, n_press);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * H_TOT * V_TOT * (N_FRAMES + 1) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

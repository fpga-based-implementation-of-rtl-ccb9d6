// tb_bram_wr_fsm: runs the load/read controller (4x3 ROI) over small frames
// with one controller step per cycle and counts, per frame, address clears,
// ROI accesses, BRAM writes and completed passes. Scenario:
//   frames 0,1 : read passes; a short sw0 press during the pass of frame 1,
//                remembered until the next frame start
//   frame 2    : load pass (W1_R0 high, 12 writes), W1_R0 low afterwards
//   frame 3    : read pass; sw0 raised before the next Vsync and held
//   frame 4    : no pass while sw0 is held; released during the frame
//   frame 5    : load pass
//   frame 6    : frame with too few lines: the pass is abandoned at Vsync
//   frame 7    : read pass restarted from address 0 and completed
// Every cycle it also checks that an access happens exactly on the ROI
// pixels of a running pass and that the row/pixel counters stay in range.
module tb_bram_wr_fsm;
  import bgs_pkg::*;
  localparam int H_ACT = 8, H_TOT = 10;
  localparam int X0 = 2, W = 4, Y0 = 1, H = 3;
  logic clk = 1'b0, rst = 1'b1;
  logic sw0 = 1'b0, vsync = 1'b0, de = 1'b0, en_roi = 1'b0;
  ctrl_state_t state;
  logic w1_r0, roi_active, addr_clr, addr_inc, bram_we, pass_done;
  logic [6:0] row_count, pixel_row;
  int checks = 0, failures = 0;
  int n_clr, n_inc, n_we, n_done, n_w1;

  bram_wr_fsm #(.ROI_W(W), .ROI_H(H)) dut (
    .clk, .rst, .ce(1'b1), .sw0, .vsync, .active_line(de), .en_roi,
    .state, .w1_r0, .roi_active, .addr_clr, .addr_inc, .bram_we,
    .row_count, .pixel_row, .pass_done
  );

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // One frame: lines 0-1 Vsync, line 2 back porch, n_act active lines, one
  // front porch line. sw0 follows sw_on/sw_off (line numbers, -1 = unchanged).
  task automatic frame(input int n_act, input int sw_on, input int sw_off);
    n_clr = 0; n_inc = 0; n_we = 0; n_done = 0; n_w1 = 0;
    for (int l = 0; l < n_act + 4; l++) begin
      if (l == sw_on)  sw0 <= 1'b1;
      if (l == sw_off) sw0 <= 1'b0;
      for (int p = 0; p < H_TOT; p++) begin
        automatic int y = l - 3;
        automatic bit act = (y >= 0) && (y < n_act) && (p < H_ACT);
        automatic bit roi = act && p >= X0 && p < X0 + W && y >= Y0 && y < Y0 + H;
        automatic bit pass = (state == S_WRITE) || (state == S_READ);
        vsync <= (l < 2);
        de    <= act;
        en_roi <= roi;
        @(negedge clk);
        pass = (state == S_WRITE) || (state == S_READ);
        check(roi_active == (roi && pass), "roi_active");
        check(bram_we == (roi && state == S_WRITE), "bram_we");
        check(int'(pixel_row) <= W && int'(row_count) <= H, "counter range");
        n_clr += int'(addr_clr);
        n_inc += int'(addr_inc);
        n_we  += int'(bram_we);
        n_done += int'(pass_done);
        n_w1  += int'(w1_r0);
        @(posedge clk);
      end
    end
  endtask

  task automatic expect_counts(input int f, input int e_clr, input int e_inc, input int e_we,
                               input int e_done);
    check(n_clr == e_clr && n_inc == e_inc && n_we == e_we && n_done == e_done,
          $sformatf("frame %0d counts clr=%0d inc=%0d we=%0d done=%0d", f, n_clr, n_inc,
                    n_we, n_done));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    frame(6, -1, -1);  expect_counts(0, 1, W*H, 0, 1);
    check(n_w1 == 0, "w1_r0 low in read frame");
    frame(6, 5, 6);    expect_counts(1, 1, W*H, 0, 1);   // press during the pass
    check(w1_r0 == 1'b0, "w1_r0 waits for the frame start");
    frame(6, -1, -1);  expect_counts(2, 1, W*H, W*H, 1); // load pass
    check(w1_r0 == 1'b0, "w1_r0 cleared after the load pass");
    check(n_w1 > 0, "w1_r0 high during the load pass");
    frame(6, 9, -1);   expect_counts(3, 1, W*H, 0, 1);   // sw0 goes high at the end
    check(w1_r0 == 1'b1 && state == S_WAIT_SW0, "held sw0 keeps WAIT_SW0 with W1_R0 set");
    frame(6, -1, 5);   expect_counts(4, 0, 0, 0, 0);     // no pass while held
    frame(6, -1, -1);  expect_counts(5, 1, W*H, W*H, 1); // load pass
    frame(3, -1, -1);  expect_counts(6, 1, 2*W, 0, 0);   // too short: abandoned
    frame(6, -1, -1);  expect_counts(7, 1, W*H, 0, 1);   // restarted read pass
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_duck_hunt_top_full: the whole design at its real sizes and rates (no
// parameter changes): 720 x 460 interlaced camera frames from a behavioural model
// of the video decoder, the 1024x768 raster, a 4-pixel duck step, the 0.25 s
// wing-flap divider and the 10 ms button debounce.
// One complete operation: the laser spot is placed on the first duck's flight
// path; the camera frame is captured, stored, scanned and analysed; the cursor
// must land on the scaled spot position and be drawn in red on the VGA output;
// the camera view is shown for a frame and compared with the scene; the trigger
// is pulled while the duck is under the cursor and the duck must die with score
// bit 0 set. Mechanisms counted: write retries, reader stalls, completed scans,
// camera frames, wing flaps, hit, camera-view pixels and cursor-dot pixels.
module tb_duck_hunt_top_full;
  localparam int SPOT_X = 130, SPOT_Y = 312;   // on the duck's path about 20 frames in
  logic clk = 0, tvclk = 0, reset = 1, run = 0;
  logic fire_n = 1, show_camera = 0;
  logic [7:0] threshold = 100;
  logic [9:0] tv;
  logic [7:0] vr, vg, vb, avg, totalducks;
  logic hs, vs, bl, scan_valid;
  logic [10:0] cx;
  logic [9:0]  cy;
  logic [3:0]  score;
  logic [1:0]  bounces;
  logic [29:0] scan_rgb;
  logic [23:0] scan_hsv;
  int frames_sent, spot_x = SPOT_X, spot_y = SPOT_Y;
  int checks = 0, failures = 0;
  int n_retry = 0, n_stall = 0, n_scan = 0, n_flap = 0, n_top = 0, n_cam = 0, n_dot = 0;
  int n_miss = 0, n_hit = 0, n_land = 0, n_fly = 0;

  always #13 clk = ~clk;    // 65 MHz and 27 MHz: periods in the ratio 26 : 62
  always #31 tvclk = ~tvclk;

  tb_bt656_source src (.clk(tvclk), .run(run), .spot_x(spot_x), .spot_y(spot_y),
    .sample(tv), .frames_sent(frames_sent));

  duck_hunt_top dut (
    .clock_65mhz(clk), .tv_clock(tvclk), .reset(reset), .tv_in_ycrcb(tv), .fire_button_n(fire_n),
    .threshold(threshold), .show_camera(show_camera), .vga_r(vr), .vga_g(vg), .vga_b(vb),
    .vga_hsync(hs), .vga_vsync(vs), .vga_blank(bl), .average_brightness(avg),
    .cursor_x(cx), .cursor_y(cy), .score(score), .totalducks(totalducks), .bounces(bounces),
    .scan_rgb(scan_rgb), .scan_hsv(scan_hsv), .scan_valid(scan_valid));

  `include "tb_top_checks.svh"

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog: ducks %0d score %b", totalducks, score);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10) @(posedge tvclk);
    reset = 0;
    run = 1;
    wait (frames_sent >= 2);
    wait_scans(1);
    check_cursor();
    show_camera = 1; wait_duck_frames(2); show_camera = 0;
    aim_and_fire();
    checks++;
    if (score != 4'b0001 || dut.shots != 2'd2) begin
      failures++; $display("FAIL after the hit: score %b shots %0d", score, dut.shots);
    end
    finish_report(1'b0);
  end
endmodule

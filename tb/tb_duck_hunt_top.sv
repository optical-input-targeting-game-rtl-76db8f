// tb_duck_hunt_top: end-to-end run of the whole design. A behavioural model of the
// video decoder chip sends full 720 x 460 interlaced camera frames of a scene with
// a bright laser spot; the game runs on the real 1024x768 raster. To keep the run
// short the wing-flap divider is 100,000 clocks, the button debounce 1,000 clocks
// and the duck speed 40 pixels per frame.
// Sequence: the spot is placed where the first duck will be ten frames after
// reset; one shot is fired early (a miss), then the shot is fired when the duck is
// there (a hit); the duck falls to the horizon and a new one starts, which is left
// alone until it flies away. Checked on the way:
//  * the cursor equals the spot scaled to screen coordinates;
//  * the VGA output shows the red cursor dot at the cursor position;
//  * with show_camera set, the VGA output shows the camera luminance;
//  * score, duck count and the final state.
// Mechanisms counted (each must occur): frame buffer write retries, reader stalls,
// completed image scans, camera frames, wing-flap enables, top bounces, miss, hit,
// landing, fly-away, camera-view pixels and cursor-dot pixels.
module tb_duck_hunt_top;
  localparam int PSPEED = 40;
  localparam int SPOT_X = 353, SPOT_Y = 121;   // camera coordinates of the spot
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

  duck_hunt_top #(.DIV_COUNT(100_000), .DEBOUNCE_DELAY(1000), .PSPEED(PSPEED)) dut (
    .clock_65mhz(clk), .tv_clock(tvclk), .reset(reset), .tv_in_ycrcb(tv), .fire_button_n(fire_n),
    .threshold(threshold), .show_camera(show_camera), .vga_r(vr), .vga_g(vg), .vga_b(vb),
    .vga_hsync(hs), .vga_vsync(vs), .vga_blank(bl), .average_brightness(avg),
    .cursor_x(cx), .cursor_y(cy), .score(score), .totalducks(totalducks), .bounces(bounces),
    .scan_rgb(scan_rgb), .scan_hsv(scan_hsv), .scan_valid(scan_valid));

  `include "tb_top_checks.svh"

  initial begin
    repeat (400_000_000) @(posedge clk);
    failures++;
    $display("watchdog: ducks %0d score %b", totalducks, score);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10) @(posedge tvclk);
    reset = 0;
    run = 1;
    // early shot: the duck is far from the cursor
    wait_duck_frames(3);
    fire();
    // the camera has delivered the spot: check the cursor
    wait (frames_sent >= 2);
    wait_scans(2);
    check_cursor();
    // camera view for one frame
    show_camera = 1; wait_duck_frames(2); show_camera = 0;
    // shoot when the duck sits on the cursor
    aim_and_fire();
    wait (totalducks == 1);
    checks++;
    if (score != 4'b0001) begin failures++; $display("FAIL score after hit %b", score); end
    // move the spot away and let the next duck escape
    spot_x = 10; spot_y = 440;
    wait (totalducks == 2);
    repeat (5) @(posedge clk);
    checks++;
    if (score != 4'b0001) begin failures++; $display("FAIL score after fly-away %b", score); end
    finish_report(1'b1);
  end
endmodule

// duck_hunt_top: a Duck Hunt style shooting game whose "light gun" is a laser
// pointer watched by a video camera.
//
// Camera half (65 MHz system clock, plus the 27 MHz decoder clock):
//   ntsc_decoder -> fb_writer -> fb_arbiter -> frame_buffer -> fb_reader ->
//   pixel_analyzer (with ycrcb2hsv and coord_scaler) -> cursor_x / cursor_y.
//   fb_display also reads the frame buffer so the raw camera picture can be shown
//   (show_camera = 1). The arbiter gives the frame buffer to fb_display first,
//   fb_writer second and fb_reader last.
// Game half (65 MHz pixel clock): xvga timing -> duck_hunt_game, which moves the
//   duck, handles shots and score, and merges the pixels of bush/tree
//   (stationary_sprite), score_sprite, shot_sprite and duck_sprite; the 4-bit
//   result goes through look_up_table to 8-bit RGB.
// The cursor from the camera half feeds the game's hit test and cursor dot; the
// debounced fire button (active low, as board push-buttons are) is the trigger.
// scan_rgb / scan_hsv carry the colour-converted pixel stream of the image scan
// (with scan_valid) for colour-based detection or debugging.
//
// All VGA outputs are registered once more here, so they are four clocks behind
// xvga's counters. Resets: reset is synchronous to clock_65mhz; a two-flip-flop
// copy of it resets the 27 MHz side. The ADV7185's power-on I2C set-up is outside
// this design; its pixel bus enters on tv_in_ycrcb.
module duck_hunt_top
  import duck_hunt_pkg::*;
  import video_pkg::*;
#(
  parameter int unsigned DIV_COUNT      = 16_250_000,
  parameter int unsigned DEBOUNCE_DELAY = 650_000,
  parameter int          PSPEED         = 4
) (
  input  logic          clock_65mhz,
  input  logic          tv_clock,
  input  logic          reset,
  input  logic [9:0]    tv_in_ycrcb,
  input  logic          fire_button_n,
  input  logic [7:0]    threshold,
  input  logic          show_camera,
  output logic [7:0]    vga_r,
  output logic [7:0]    vga_g,
  output logic [7:0]    vga_b,
  output logic          vga_hsync,
  output logic          vga_vsync,
  output logic          vga_blank,
  output logic [7:0]    average_brightness,
  output logic [HW-1:0] cursor_x,
  output logic [VW-1:0] cursor_y,
  output logic [3:0]    score,
  output logic [7:0]    totalducks,
  output logic [1:0]    bounces,
  output logic [29:0]   scan_rgb,
  output logic [23:0]   scan_hsv,
  output logic          scan_valid
);
  // ---------------- camera half ----------------
  logic [1:0] tv_reset_sync;
  logic       tv_reset;
  always_ff @(posedge tv_clock) tv_reset_sync <= {tv_reset_sync[0], reset};
  assign tv_reset = tv_reset_sync[1];

  logic [7:0] dec_y, dec_cr, dec_cb;
  logic [2:0] dec_fvh;
  logic       dec_valid;

  ntsc_decoder decoder (
    .clk(tv_clock), .reset(tv_reset), .tv_in_ycrcb(tv_in_ycrcb),
    .y(dec_y), .cr(dec_cr), .cb(dec_cb), .fvh(dec_fvh), .data_valid(dec_valid));

  fb_addr_t wr_addr, disp_addr, rd_addr, zbt_address;
  fb_word_t wr_data, zbt_write_data, zbt_read_data;
  logic     wr_req, write_failed, write_completed, disp_req, read_success, zbt_we;

  fb_writer writer (
    .clock_65mhz(clock_65mhz), .reset(reset), .video_clock(tv_clock), .video_reset(tv_reset),
    .fvh(dec_fvh), .data_valid(dec_valid), .yin(dec_y), .crin(dec_cr), .cbin(dec_cb),
    .zbt_write_address(wr_addr), .zbt_write_data(wr_data), .zbt_write_enable(wr_req),
    .write_failed(write_failed), .write_completed(write_completed));

  fb_arbiter arbiter (
    .clock_65mhz(clock_65mhz), .reset(reset),
    .disp_req(disp_req), .disp_addr(disp_addr),
    .wr_req(wr_req), .wr_addr(wr_addr), .wr_data(wr_data),
    .write_failed(write_failed), .write_completed(write_completed),
    .rd_req(1'b1), .rd_addr(rd_addr), .read_success(read_success),
    .zbt_write_enable(zbt_we), .zbt_address(zbt_address), .zbt_write_data(zbt_write_data));

  frame_buffer fbuf (
    .clock_65mhz(clock_65mhz), .zbt_enable(1'b1), .zbt_write_enable(zbt_we),
    .zbt_address(zbt_address), .zbt_write_data(zbt_write_data), .zbt_read_data(zbt_read_data));

  fb_word_t      read_data;
  logic [XW-1:0] read_x;
  logic [YW-1:0] read_y;
  logic          read_valid, new_frame;

  fb_reader reader (
    .clock_65mhz(clock_65mhz), .reset(reset), .zbt_data(zbt_read_data), .read_success(read_success),
    .read_address(rd_addr), .read_data(read_data), .read_x(read_x), .read_y(read_y),
    .read_valid(read_valid), .new_frame(new_frame));

  logic [9:0] cvt_r, cvt_g, cvt_b;
  logic [7:0] cvt_h, cvt_s, cvt_v;

  assign scan_rgb = {cvt_r, cvt_g, cvt_b};
  assign scan_hsv = {cvt_h, cvt_s, cvt_v};

  pixel_analyzer analyzer (
    .clock_65mhz(clock_65mhz), .reset(reset), .read_data(read_data), .read_x(read_x),
    .read_y(read_y), .read_valid(read_valid), .new_frame(new_frame), .threshold(threshold),
    .x(cursor_x), .y(cursor_y), .average_brightness(average_brightness),
    .cvt_r(cvt_r), .cvt_g(cvt_g), .cvt_b(cvt_b), .cvt_h(cvt_h), .cvt_s(cvt_s), .cvt_v(cvt_v),
    .cvt_valid(scan_valid));

  // ---------------- game half ----------------
  logic [HW-1:0] hcount;
  logic [VW-1:0] vcount;
  logic          hsync, vsync, blank;

  xvga timing (.vclock(clock_65mhz), .reset(reset), .hcount(hcount), .vcount(vcount),
               .hsync(hsync), .vsync(vsync), .blank(blank));

  logic [7:0] cam_pixel;
  fb_display display (
    .clock_65mhz(clock_65mhz), .hcount(hcount), .vcount(vcount),
    .disp_req(disp_req), .disp_addr(disp_addr), .zbt_read_data(zbt_read_data), .pixel(cam_pixel));

  logic shot;
  debouncer #(.DELAY(DEBOUNCE_DELAY)) fire_debounce (
    .clk(clock_65mhz), .reset(reset), .noisy(!fire_button_n), .clean(shot));

  logic [3:0]    bush_pixel, tree_pixel, score_pixel, shot_pixel, duck_pixel, pixel;
  logic [HW-1:0] duck_x;
  logic [VW-1:0] duck_y;
  logic          dead, orientation, phsync, pvsync, pblank;
  logic [1:0]    shots;

  stationary_sprite #(.ART(ART_BUSH), .MY_X(800), .MY_Y(600)) bush (
    .vclock(clock_65mhz), .hcount(hcount), .vcount(vcount), .pixel(bush_pixel));
  stationary_sprite #(.ART(ART_TREE), .MY_X(60), .MY_Y(480)) tree (
    .vclock(clock_65mhz), .hcount(hcount), .vcount(vcount), .pixel(tree_pixel));
  score_sprite score_disp (
    .vclock(clock_65mhz), .hcount(hcount), .vcount(vcount), .score(score), .pixel(score_pixel));
  shot_sprite shot_disp (
    .vclock(clock_65mhz), .hcount(hcount), .vcount(vcount), .shots(shots), .pixel(shot_pixel));
  duck_sprite #(.DIV_COUNT(DIV_COUNT)) duck (
    .vclock(clock_65mhz), .rst(reset), .x(duck_x), .y(duck_y), .hcount(hcount), .vcount(vcount),
    .dead(dead), .orientation(orientation), .pixel(duck_pixel));

  duck_hunt_game #(.PSPEED(PSPEED)) game (
    .vclock(clock_65mhz), .reset(reset), .hcount(hcount), .vcount(vcount),
    .hsync(hsync), .vsync(vsync), .blank(blank), .shot(shot),
    .cursor_x(cursor_x), .cursor_y(cursor_y),
    .bush_pixel(bush_pixel), .tree_pixel(tree_pixel), .score_pixel(score_pixel),
    .shot_pixel(shot_pixel), .duck_pixel(duck_pixel),
    .phsync(phsync), .pvsync(pvsync), .pblank(pblank), .pixel(pixel),
    .duck_x(duck_x), .duck_y(duck_y), .dead(dead), .orientation(orientation),
    .score(score), .shots(shots), .totalducks(totalducks), .bounces(bounces));

  logic [7:0] lut_r, lut_g, lut_b;
  look_up_table palette (.pixel(pixel), .r(lut_r), .g(lut_g), .b(lut_b));

  always_ff @(posedge clock_65mhz) begin
    vga_hsync <= phsync;
    vga_vsync <= pvsync;
    vga_blank <= pblank;
    if (pblank)           {vga_r, vga_g, vga_b} <= '0;
    else if (show_camera) {vga_r, vga_g, vga_b} <= {3{cam_pixel}};
    else                  {vga_r, vga_g, vga_b} <= {lut_r, lut_g, lut_b};
  end
endmodule

// Shared checking code of the two top-level testbenches (included inside the
// testbench module; expects clk, dut, src, the counters and the spot variables).

  // expected screen position of a camera pixel, as the design scales it
  function automatic int scale_x(int x); return (x * 1024 + 360) / 720; endfunction
  function automatic int scale_y(int y); return (y * 768 + 230) / 460; endfunction

  // mechanism monitors
  logic prev_dead = 0;
  logic [1:0] prev_bounces = 0;
  logic [1:0] prev_shots = 3;
  logic [7:0] prev_total = 0;
  always @(posedge clk) if (!reset) begin
    if (dut.write_failed) n_retry++;
    if (dut.reader.read_address != 0 && !dut.read_success) n_stall++;
    if (dut.new_frame) n_scan++;
    if (dut.duck.enbl) n_flap++;
    if (dut.bounces != prev_bounces && dut.bounces != 0) n_top++;
    if (dut.shots < prev_shots && !dut.dead && prev_total == dut.totalducks) n_miss++;
    if (dut.dead && !prev_dead) n_hit++;
    if (dut.totalducks != prev_total) begin
      if (prev_dead) n_land++; else n_fly++;
      $display("%0t: duck %0d ends (%s)", $time, prev_total, prev_dead ? "landed" : "flew away");
    end
    prev_dead <= dut.dead; prev_bounces <= dut.bounces; prev_shots <= dut.shots;
    prev_total <= dut.totalducks;
  end

  // VGA output checks against the raster position four clocks earlier
  int hh [4], vh [4];
  always @(posedge clk) begin
    for (int i = 3; i > 0; i--) begin hh[i] <= hh[i-1]; vh[i] <= vh[i-1]; end
    hh[0] <= int'(dut.hcount); vh[0] <= int'(dut.vcount);
  end
  always @(negedge clk) if (!reset && frames_sent >= 2 && hh[3] < 1024 && vh[3] < 768) begin
    if (show_camera && hh[3] < 720 && vh[3] < 460 && (hh[3] % 7 == 0) &&
        !(hh[3] >= spot_x - 2 && hh[3] < spot_x + 5 && vh[3] >= spot_y - 2 && vh[3] < spot_y + 5)) begin
      checks++; n_cam++;
      if (vr !== src.scene_y(vh[3], hh[3]) || vg !== vr || vb !== vr) begin
        failures++;
        if (failures < 10) $display("FAIL camera view (%0d,%0d): %0d exp %0d", hh[3], vh[3], vr, src.scene_y(vh[3], hh[3]));
      end
    end
    if (!show_camera && hh[3] == int'(cx) && vh[3] == int'(cy) && n_scan > 2) begin
      checks++; n_dot++;
      if ({vr, vg, vb} !== 24'hFF0000) begin
        failures++;
        $display("FAIL cursor dot at (%0d,%0d): %h", hh[3], vh[3], {vr, vg, vb});
      end
    end
  end

  task automatic wait_duck_frames(int n);
    repeat (n) @(negedge dut.vsync);
    repeat (10) @(posedge clk);
  endtask

  task automatic wait_scans(int n);
    repeat (n) @(posedge dut.new_frame);
    repeat (5) @(posedge clk);
  endtask

  task automatic fire();
    fire_n = 0; wait_duck_frames(1); fire_n = 1; wait_duck_frames(1);
  endtask

  task automatic check_cursor();
    checks++;
    if (cx != 11'(scale_x(spot_x)) || cy != 10'(scale_y(spot_y))) begin
      failures++;
      $display("FAIL cursor (%0d,%0d) exp (%0d,%0d)", cx, cy, scale_x(spot_x), scale_y(spot_y));
    end else $display("cursor (%0d,%0d) follows the spot", cx, cy);
  endtask

  // press as soon as the duck's current square holds the cursor: the shot is
  // sampled at the next frame start, before the duck moves again
  task automatic aim_and_fire();
    int tries = 0;
    while (!dut.dead && tries < 400) begin
      wait_duck_frames(1);
      tries++;
      if (cx >= dut.duck_x && cx < dut.duck_x + 30 && cy >= dut.duck_y && cy < dut.duck_y + 30) begin
        fire_n = 0; wait_duck_frames(1); fire_n = 1;
      end
    end
    checks++;
    if (!dut.dead) begin failures++; $display("FAIL duck never hit"); end
  endtask

  // full = 1: every mechanism must have occurred; full = 0: the shorter full-size
  // run only needs the camera path, the wing flap, the hit and the two displays
  task automatic finish_report(bit full);
    $display("retries %0d stalls %0d scans %0d camera frames %0d flaps %0d top bounces %0d",
             n_retry, n_stall, n_scan, frames_sent, n_flap, n_top);
    $display("misses %0d hits %0d landings %0d fly-aways %0d camera pixels %0d cursor pixels %0d",
             n_miss, n_hit, n_land, n_fly, n_cam, n_dot);
    checks++;
    if (n_retry == 0 || n_stall == 0 || n_scan == 0 || frames_sent == 0 || n_flap == 0 ||
        n_hit == 0 || n_cam == 0 || n_dot == 0 ||
        (full && (n_top == 0 || n_miss == 0 || n_land == 0 || n_fly == 0))) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

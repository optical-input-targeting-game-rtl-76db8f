// tb_duck_hunt_game: drives the game with a small raster (64 x 40 clocks per
// frame, vsync low on lines 35-36) and PSPEED = 40, and compares, every clock, the
// duck position, direction, bounce count, dead flag, shots, score and duck count
// with a reference model of the rules. Scenarios: free flight until the duck flies
// away after its bounces, three missed shots and a fourth with no ammunition, a hit,
// the fall to the horizon and the next duck. Each event (every wall bounce, fly-away,
// miss, hit, empty gun, landing) must happen at least once. In parallel the pixel
// priority (cursor dot, then duck, then the OR of the stationary sprites) and the
// three-clock delay of pixel and syncs are checked with random sprite pixels.
module tb_duck_hunt_game;
  import duck_hunt_pkg::*;
  localparam int HT = 64, VT = 40, PSPEED = 40, HORIZON = 640, START_X = 100, START_Y = 600;
  logic clk = 0, reset = 1;
  logic [10:0] hcount = 0, cursor_x = 900;
  logic [9:0]  vcount = 0, cursor_y = 700;
  logic hsync = 1, vsync = 1, blank = 0, shot = 0;
  logic [3:0] bush_p = 0, tree_p = 0, score_p = 0, shot_p = 0, duck_p = 0;
  logic phsync, pvsync, pblank, dead, orientation;
  logic [3:0] pixel, score;
  logic [10:0] duck_x;
  logic [9:0]  duck_y;
  logic [1:0]  shots, bounces;
  logic [7:0]  totalducks;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  duck_hunt_game #(.PSPEED(PSPEED)) dut (
    .vclock(clk), .reset(reset), .hcount(hcount), .vcount(vcount), .hsync(hsync), .vsync(vsync),
    .blank(blank), .shot(shot), .cursor_x(cursor_x), .cursor_y(cursor_y),
    .bush_pixel(bush_p), .tree_pixel(tree_p), .score_pixel(score_p), .shot_pixel(shot_p),
    .duck_pixel(duck_p), .phsync(phsync), .pvsync(pvsync), .pblank(pblank), .pixel(pixel),
    .duck_x(duck_x), .duck_y(duck_y), .dead(dead), .orientation(orientation), .score(score),
    .shots(shots), .totalducks(totalducks), .bounces(bounces));

  // ---------------- reference model ----------------
  int  mx, my, mb, mshots, mtotal;
  bit  mxl, myu, mdead, mvs_q = 1, mshot_q;
  bit [3:0] mscore;
  int  ev_left, ev_right, ev_top, ev_bottom, ev_fly, ev_miss, ev_hit, ev_empty, ev_land;

  task automatic model_new_duck();
    mx = START_X; my = START_Y; mxl = 0; myu = 1; mb = 0; mdead = 0; mshots = 3;
    mtotal = (mtotal + 1) % 256;
  endtask

  task automatic model_frame(bit fire);
    if (mdead) begin
      if (my + PSPEED >= HORIZON) begin ev_land++; model_new_duck(); end
      else my += PSPEED;
      return;
    end
    if (fire && mshots > 0) begin
      mshots--;
      if (cursor_x >= mx && cursor_x < mx + 30 && cursor_y >= my && cursor_y < my + 30) begin
        mdead = 1; mscore[mtotal % 4] = 1; ev_hit++;
      end else ev_miss++;
      return;
    end
    if (fire) ev_empty++;
    if (mxl) begin
      if (mx < PSPEED) begin mx = PSPEED - 1; mxl = 0; ev_left++; end else mx -= PSPEED;
    end else begin
      if (mx + PSPEED >= 1024 - 30) begin mxl = 1; ev_right++; end else mx += PSPEED;
    end
    if (myu) begin
      if (my < PSPEED) begin
        if (mb == 3) begin mscore[mtotal % 4] = 0; ev_fly++; model_new_duck(); return; end
        mb++; my = PSPEED - 1; myu = 0; ev_top++;
      end else my -= PSPEED;
    end else begin
      if (my + PSPEED >= HORIZON) begin myu = 1; ev_bottom++; end else my += PSPEED;
    end
  endtask

  always @(posedge clk) begin
    if (reset) begin
      mx = START_X; my = START_Y; mxl = 0; myu = 1; mb = 0; mdead = 0; mshots = 3;
      mscore = 0; mtotal = 0; mvs_q = 1; mshot_q = 0;
    end else begin
      if (!vsync && mvs_q) begin
        model_frame(shot && !mshot_q);
        mshot_q = shot;
      end
      mvs_q = vsync;
    end
  end

  always @(negedge clk) if (!reset) begin
    checks++;
    if (duck_x != 11'(mx) || duck_y != 10'(my) || orientation != mxl || bounces != 2'(mb) ||
        dead != mdead || shots != 2'(mshots) || score != mscore || totalducks != 8'(mtotal)) begin
      failures++;
      if (failures < 10)
        $display("FAIL state: dut x%0d y%0d o%0d b%0d d%0d s%0d sc%b t%0d  model x%0d y%0d o%0d b%0d d%0d s%0d sc%b t%0d",
                 duck_x, duck_y, orientation, bounces, dead, shots, score, totalducks,
                 mx, my, mxl, mb, mdead, mshots, mscore, mtotal);
    end
  end

  // ---------------- raster and pixel priority ----------------
  int h_hist [4], v_hist [4], cx_hist [4], cy_hist [4];
  bit hs_hist [4], vs_hist [4], bl_hist [4];  // index i: set i+1 clocks ago
  int pix_checks = 0;

  initial begin
    int h, v;
    h = 0; v = 0;
    forever begin
      @(negedge clk);
      // check outputs belonging to the raster position of three clocks ago
      if (!reset && pix_checks < 1_000_000 && h_hist[2] >= 0) begin
        logic [3:0] e;
        bit cur;
        cur = h_hist[2] >= cx_hist[2] && h_hist[2] < cx_hist[2] + 4 &&
              v_hist[2] >= cy_hist[2] && v_hist[2] < cy_hist[2] + 4;
        if (cur) e = 4'd9;
        else if (duck_p != 0) e = duck_p;
        else e = bush_p | tree_p | score_p | shot_p;
        checks++; pix_checks++;
        if (pixel !== e || phsync !== hs_hist[2] || pvsync !== vs_hist[2] || pblank !== bl_hist[2]) begin
          failures++;
          if (failures < 10) $display("FAIL pixel: got %0d exp %0d", pixel, e);
        end
      end
      for (int i = 3; i > 0; i--) begin
        h_hist[i] = h_hist[i-1]; v_hist[i] = v_hist[i-1];
        cx_hist[i] = cx_hist[i-1]; cy_hist[i] = cy_hist[i-1];
        hs_hist[i] = hs_hist[i-1]; vs_hist[i] = vs_hist[i-1]; bl_hist[i] = bl_hist[i-1];
      end
      hcount = 11'(h); vcount = 10'(v);
      hsync = !(h >= 50 && h < 58);
      vsync = !(v >= 35 && v < 37);
      blank = (h >= 48) || (v >= 32);
      h_hist[0] = h; v_hist[0] = v; cx_hist[0] = cursor_x; cy_hist[0] = cursor_y;
      hs_hist[0] = hsync; vs_hist[0] = vsync; bl_hist[0] = blank;
      // sprite pixels presented now belong to the raster position of two clocks ago
      bush_p  = ($urandom % 2) ? 4'($urandom) : 4'd0;
      tree_p  = ($urandom % 2) ? 4'($urandom) : 4'd0;
      score_p = ($urandom % 2) ? 4'($urandom) : 4'd0;
      shot_p  = ($urandom % 2) ? 4'($urandom) : 4'd0;
      duck_p  = ($urandom % 2) ? 4'($urandom) : 4'd0;
      h++;
      if (h == HT) begin h = 0; v = (v + 1) % VT; end
    end
  end

  // ---------------- scenario ----------------
  task automatic wait_frames(int n);
    repeat (n) @(negedge vsync);
    @(posedge vsync);
  endtask

  task automatic fire_once();
    shot = 1; wait_frames(1); shot = 0; wait_frames(1);
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) h_hist[i] = -1;
    cursor_x = 5; cursor_y = 5;
    repeat (5) @(negedge clk);
    reset = 0;
    // 1: free flight until the first duck flies away
    while (totalducks == 0) wait_frames(1);
    // 2: three misses, then an empty gun
    cursor_x = 1000; cursor_y = 700;
    repeat (4) fire_once();
    // 3: next duck, aim at it and fire
    while (totalducks == 1) wait_frames(1);
    wait_frames(2);
    cursor_x = duck_x + 10; cursor_y = duck_y + 10;
    fire_once();
    // 4: it falls to the horizon and a new duck starts
    while (totalducks == 2) wait_frames(1);
    wait_frames(3);
    checks++;
    if (ev_left == 0 || ev_right == 0 || ev_top == 0 || ev_bottom == 0 || ev_fly == 0 ||
        ev_miss < 3 || ev_hit == 0 || ev_empty == 0 || ev_land == 0) begin
      failures++;
      $display("FAIL missing event: left%0d right%0d top%0d bottom%0d fly%0d miss%0d hit%0d empty%0d land%0d",
               ev_left, ev_right, ev_top, ev_bottom, ev_fly, ev_miss, ev_hit, ev_empty, ev_land);
    end
    checks++;
    if (score != 4'b0100) begin failures++; $display("FAIL final score %b", score); end
    $display("events: left%0d right%0d top%0d bottom%0d fly%0d miss%0d hit%0d empty%0d land%0d",
             ev_left, ev_right, ev_top, ev_bottom, ev_fly, ev_miss, ev_hit, ev_empty, ev_land);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_stationary_sprite: sweeps a small raster (200 x 100 positions) over a bush
// at (50, 20) and a tree at (110, 5) for three frames. Every output pixel, two
// clocks after its raster position, must be the artwork pixel inside_cnt the sprite
// and 0 outside.
module tb_stationary_sprite;
  import duck_hunt_pkg::*;
  localparam int HT = 200, VT = 170;
  logic clk = 0;
  logic [10:0] hcount = 0;
  logic [9:0]  vcount = 0;
  logic [3:0]  bush_px, tree_px;
  int checks = 0, failures = 0;
  logic [3:0] exp_b [3], exp_t [3];
  int inside_cnt = 0;

  always #5 clk = ~clk;

  stationary_sprite #(.ART(ART_BUSH), .MY_X(50), .MY_Y(20)) bush (
    .vclock(clk), .hcount(hcount), .vcount(vcount), .pixel(bush_px));
  stationary_sprite #(.ART(ART_TREE), .MY_X(110), .MY_Y(5)) tree (
    .vclock(clk), .hcount(hcount), .vcount(vcount), .pixel(tree_px));

  function automatic logic [3:0] expect_px(art_e a, int x0, int y0, int w, int h, int hc, int vc);
    if (hc >= x0 && hc < x0 + w && vc >= y0 && vc < y0 + h) return art_pixel(a, 0, vc - y0, hc - x0);
    return 4'd0;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 3; f++)
      for (int v = 0; v < VT; v++)
        for (int h = 0; h < HT; h++) begin
          @(negedge clk);
          if (f > 0 || v > 0 || h > 1) begin
            checks += 2;
            if (bush_px !== exp_b[2]) begin
              failures++;
              if (failures < 10) $display("FAIL bush f%0d v%0d h%0d got %0d exp %0d", f, v, h, bush_px, exp_b[2]);
            end
            if (tree_px !== exp_t[2]) begin
              failures++;
              if (failures < 10) $display("FAIL tree f%0d v%0d h%0d got %0d exp %0d", f, v, h, tree_px, exp_t[2]);
            end
            if (exp_b[2] != 0) inside_cnt++;
          end
          hcount = 11'(h);
          vcount = 10'(v);
          exp_b[2] = exp_b[1]; exp_b[1] = expect_px(ART_BUSH, 50, 20, BUSH_W, BUSH_H, h, v);
          exp_t[2] = exp_t[1]; exp_t[1] = expect_px(ART_TREE, 110, 5, TREE_W, TREE_H, h, v);
        end
    checks++;
    if (inside_cnt == 0) begin failures++; $display("FAIL never inside_cnt the sprite"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

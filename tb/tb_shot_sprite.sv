// tb_shot_sprite: sweeps a raster over the 60x30 shots panel at (10, 5) with
// 3, 2, 1 and 0 shots left. Bullet k (left to right) must be white while k < shots
// and black once spent; other pixels follow the artwork; 0 outside. Two clocks of
// latency.
module tb_shot_sprite;
  import duck_hunt_pkg::*;
  localparam int HT = 80, VT = 40, X0 = 10, Y0 = 5;
  logic clk = 0;
  logic [10:0] hcount = 0;
  logic [9:0]  vcount = 0;
  logic [1:0]  shots = 3;
  logic [3:0]  pixel;
  int checks = 0, failures = 0, lit = 0;
  logic [3:0] exp_q [3];

  always #5 clk = ~clk;

  shot_sprite #(.MY_X(X0), .MY_Y(Y0)) dut (
    .vclock(clk), .hcount(hcount), .vcount(vcount), .shots(shots), .pixel(pixel));

  function automatic logic [3:0] expect_px(int hc, int vc);
    logic [3:0] a;
    int k;
    if (!(hc >= X0 && hc < X0 + 60 && vc >= Y0 && vc < Y0 + 30)) return 4'd0;
    a = art_pixel(ART_SHOTS, 0, vc - Y0, hc - X0);
    k = (hc - X0) / 20;
    if (a == 4'd15) return (k < shots) ? 4'd15 : 4'd0;
    return a;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 5; f++) begin
      shots = 2'(3 - (f % 4));
      for (int v = 0; v < VT; v++)
        for (int h = 0; h < HT; h++) begin
          @(negedge clk);
          if (f > 0 || v > 0 || h > 1) begin
            checks++;
            if (pixel !== exp_q[2]) begin
              failures++;
              if (failures < 10) $display("FAIL f%0d v%0d h%0d got %0d exp %0d", f, v, h, pixel, exp_q[2]);
            end
            if (pixel == 15) lit++;
          end
          hcount = 11'(h);
          vcount = 10'(v);
          exp_q[2] = exp_q[1];
          exp_q[1] = expect_px(h, v);
        end
    end
    checks++;
    if (lit == 0) begin failures++; $display("FAIL bullets never lit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

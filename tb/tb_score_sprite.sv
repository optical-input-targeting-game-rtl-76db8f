// tb_score_sprite: sweeps a raster over the 90x60 score panel at (30, 10) for
// four frames with score = 0000, 0101, 1010 and 1111. White pixels of duck mark k
// must be white when score[k] = 1 and black (0) otherwise; other pixels are the
// artwork; outside the panel the output is 0. Two clocks of latency.
module tb_score_sprite;
  import duck_hunt_pkg::*;
  localparam int HT = 140, VT = 80, X0 = 30, Y0 = 10;
  logic clk = 0;
  logic [10:0] hcount = 0;
  logic [9:0]  vcount = 0;
  logic [3:0]  score = 0, pixel;
  int checks = 0, failures = 0, lit = 0, dark = 0;
  logic [3:0] exp_q [3];
  logic [3:0] scores [4] = '{4'b0000, 4'b0101, 4'b1010, 4'b1111};

  always #5 clk = ~clk;

  score_sprite #(.MY_X(X0), .MY_Y(Y0)) dut (
    .vclock(clk), .hcount(hcount), .vcount(vcount), .score(score), .pixel(pixel));

  function automatic logic [3:0] expect_px(int hc, int vc);
    logic [3:0] a;
    int k;
    if (!(hc >= X0 && hc < X0 + 90 && vc >= Y0 && vc < Y0 + 60)) return 4'd0;
    a = art_pixel(ART_SCORE, 0, vc - Y0, hc - X0);
    k = (hc - X0 < 32) ? 0 : (hc - X0 < 44) ? 1 : (hc - X0 < 56) ? 2 : 3;
    if (a == 4'd15) return score[k] ? 4'd15 : 4'd0;
    return a;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 5; f++) begin
      score = scores[f % 4];
      for (int v = 0; v < VT; v++)
        for (int h = 0; h < HT; h++) begin
          @(negedge clk);
          if (f > 0 || v > 0 || h > 1) begin
            checks++;
            if (pixel !== exp_q[2]) begin
              failures++;
              if (failures < 10) $display("FAIL f%0d v%0d h%0d got %0d exp %0d", f, v, h, pixel, exp_q[2]);
            end
            if (f > 0 && pixel == 15) lit++;
            if (f > 0 && exp_q[2] == 0 && v > Y0 + 20 && v < Y0 + 40 && h > X0 + 4 && h < X0 + 86) dark++;
          end
          hcount = 11'(h);
          vcount = 10'(v);
          exp_q[2] = exp_q[1];
          exp_q[1] = expect_px(h, v);
        end
    end
    checks++;
    if (lit == 0 || dark == 0) begin failures++; $display("FAIL marks never lit or never dark"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

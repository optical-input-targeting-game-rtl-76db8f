// tb_duck_sprite: sweeps a 100 x 80 raster for eight frames with the frame divider
// set to 5000 clocks, so the animation frame changes several times (also within a
// raster frame). The duck is drawn facing right, then mirrored, then dead. A
// reference model of the frame sequence (flying 0,1,2,0..., falling 0,1,0...)
// predicts every output pixel two clocks after its raster position, reading the
// artwork directly by (frame, row, column) with columns reversed when mirrored.
module tb_duck_sprite;
  import duck_hunt_pkg::*;
  localparam int HT = 100, VT = 80, COUNT = 5000;
  logic clk = 0, rst = 1;
  logic [10:0] hcount = 0, x = 20;
  logic [9:0]  vcount = 0, y = 10;
  logic        dead = 0, orientation = 0;
  logic [3:0]  pixel;
  int checks = 0, failures = 0;
  logic [3:0] exp_q [3];
  int m_cnt = 0, m_f = 0, m_d = 0;
  logic m_en = 0;
  int seen_live [3], seen_dead [2], mirrored = 0;

  always #5 clk = ~clk;

  duck_sprite #(.DIV_COUNT(COUNT)) dut (
    .vclock(clk), .rst(rst), .x(x), .y(y), .hcount(hcount), .vcount(vcount),
    .dead(dead), .orientation(orientation), .pixel(pixel));

  // reference model of the animation frame counters
  always @(posedge clk) begin
    if (rst) begin
      m_cnt <= 0; m_en <= 0; m_f <= 0; m_d <= 0;
    end else begin
      if (m_cnt == COUNT - 1) begin m_cnt <= 0; m_en <= 1; end
      else begin m_cnt <= m_cnt + 1; m_en <= 0; end
      if (dead) begin
        m_f <= 0;
        if (m_en) m_d <= (m_d + 1) % 2;
      end else begin
        m_d <= 0;
        if (m_en) m_f <= (m_f + 1) % 3;
      end
    end
  end

  function automatic logic [3:0] expect_px(int hc, int vc);
    int col;
    if (!(hc >= x && hc < x + 30 && vc >= y && vc < y + 30)) return 4'd0;
    col = orientation ? 29 - (hc - x) : hc - x;
    if (dead) return art_pixel(ART_DUCK_DEAD, m_d, vc - y, col);
    return art_pixel(ART_DUCK_LIVE, m_f, vc - y, col);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 8; f++) begin
      if (f == 3) begin orientation = 1; x = 50; y = 40; end
      if (f == 5) begin dead = 1; orientation = 0; x = 60; y = 5; end
      for (int v = 0; v < VT; v++)
        for (int h = 0; h < HT; h++) begin
          @(negedge clk);
          if (f > 0 || v > 0 || h > 1) begin
            checks++;
            if (pixel !== exp_q[2]) begin
              failures++;
              if (failures < 10) $display("FAIL f%0d v%0d h%0d got %0d exp %0d", f, v, h, pixel, exp_q[2]);
            end
          end
          hcount = 11'(h);
          vcount = 10'(v);
          exp_q[2] = exp_q[1];
          exp_q[1] = expect_px(h, v);
          if (h >= x && h < x + 30 && v >= y && v < y + 30) begin
            if (dead) seen_dead[m_d]++; else seen_live[m_f]++;
            if (orientation) mirrored++;
          end
        end
    end
    checks++;
    if (seen_live[0] == 0 || seen_live[1] == 0 || seen_live[2] == 0 || seen_dead[0] == 0 ||
        seen_dead[1] == 0 || mirrored == 0) begin
      failures++;
      $display("FAIL not every frame shown");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

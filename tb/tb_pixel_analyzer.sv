// tb_pixel_analyzer: 16 x 8 images are streamed into the analyzer, with random
// gaps, as words laid out like the frame buffer. Checked after each pass:
//  1. dim background with one bright spot: the spot is found (average still 0);
//  2. threshold so high that no pixel qualifies: the cursor keeps its old value;
//  3. two bright spots: the brighter one wins;
//  4. two equal spots: the first in scan order wins;
// and after every pass the average equals the top 8 bits of the luminance sum and
// the cursor equals the spot scaled to 1024 x 768 (round(x*1024/16), round(y*768/8)).
// The colour converter must deliver one result per input pixel.
module tb_pixel_analyzer;
  import video_pkg::*;
  localparam int W = 16, H = 8;
  localparam int SUM_W = $clog2(W * H * 255 + 1);
  logic clk = 0, reset = 1;
  fb_word_t rdata = 0;
  logic [10:0] rx = 0, x;
  logic [9:0]  ry = 0, y;
  logic rvalid = 0, new_frame = 0;
  logic [7:0] threshold = 0, avg;
  logic [9:0] cr_, cg_, cb_;
  logic [7:0] ch_, cs_, cv_;
  logic cvt_valid;
  int checks = 0, failures = 0, sent = 0, cvt_count = 0;
  logic [7:0] img [H][W];

  always #5 clk = ~clk;

  pixel_analyzer #(.IMG_W_P(W), .IMG_H_P(H)) dut (.clock_65mhz(clk), .reset(reset),
    .read_data(rdata), .read_x(rx), .read_y(ry), .read_valid(rvalid), .new_frame(new_frame),
    .threshold(threshold), .x(x), .y(y), .average_brightness(avg),
    .cvt_r(cr_), .cvt_g(cg_), .cvt_b(cb_), .cvt_h(ch_), .cvt_s(cs_), .cvt_v(cv_), .cvt_valid(cvt_valid));

  always @(posedge clk) if (cvt_valid) cvt_count++;

  task automatic send_frame(output int sum);
    sum = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        while ($urandom % 4 == 0) begin @(negedge clk); rvalid = 0; new_frame = 0; end
        @(negedge clk);
        rvalid = 1; rx = 11'(c); ry = 10'(r);
        new_frame = (r == H - 1 && c == W - 1);
        rdata = {4'b0, img[r][c & ~3], img[r][(c & ~3) + 1], img[r][(c & ~3) + 2], img[r][(c & ~3) + 3],
                 4'b0, 8'd128, 8'd128, 8'd128, 8'd128};
        sum += img[r][c];
        sent++;
      end
    @(negedge clk); rvalid = 0; new_frame = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic fill_background();
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) img[r][c] = 8'(20 + $urandom % 40);
  endtask

  task automatic expect_result(string what, int sum, int sx, int sy);
    int ex, ey;
    ex = (sx * 1024 + W / 2) / W; ey = (sy * 768 + H / 2) / H;
    checks++;
    if (avg != 8'(sum >> (SUM_W - 8)) || x != 11'(ex) || y != 10'(ey)) begin
      failures++;
      $display("FAIL %s: avg %0d exp %0d, cursor (%0d,%0d) exp (%0d,%0d)", what, avg, sum >> (SUM_W - 8), x, y, ex, ey);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    repeat (3) @(negedge clk);
    reset = 0;
    // 1: one spot
    fill_background(); img[3][5] = 250;
    send_frame(sum); expect_result("single spot", sum, 5, 3);
    // 2: nothing above average + threshold: cursor stays
    fill_background(); img[6][12] = 200; threshold = 250;
    send_frame(sum); expect_result("high threshold", sum, 5, 3);
    // 3: two spots, brighter wins
    threshold = 30;
    fill_background(); img[6][10] = 200; img[1][2] = 210;
    send_frame(sum); expect_result("brighter spot", sum, 2, 1);
    // 4: equal spots, first wins
    fill_background(); img[2][14] = 220; img[7][1] = 220;
    send_frame(sum); expect_result("tie", sum, 14, 2);
    // 5: a frame brighter overall
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = 8'(150 + $urandom % 50);
    img[4][15] = 255;
    send_frame(sum); expect_result("bright frame", sum, 15, 4);
    repeat (10) @(negedge clk);
    checks++;
    if (cvt_count != sent) begin failures++; $display("FAIL converter results %0d for %0d pixels", cvt_count, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

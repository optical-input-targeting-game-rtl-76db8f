// tb_ntsc_decoder: a BT.656 stream of two small frames (32 pixels x 6 lines per
// field) goes through the decoder. Every pixel must come out once, in order, with
// the Y, Cr and Cb sent for it and with fvh showing the right field and no
// blanking; no pixel may come out during blanking.
module tb_ntsc_decoder;
  logic clk = 0, reset = 1, run = 0;
  logic [9:0] sample;
  logic [7:0] y, cr, cb;
  logic [2:0] fvh;
  logic data_valid;
  int frames_sent;
  int checks = 0, failures = 0, got = 0;

  always #18 clk = ~clk;

  tb_bt656_source #(.ACTIVE_W(32), .ACTIVE_LINES(6), .V_BLANK(3), .H_BLANK(20)) src (
    .clk(clk), .run(run), .spot_x(10), .spot_y(4), .sample(sample), .frames_sent(frames_sent));

  ntsc_decoder dut (.clk(clk), .reset(reset), .tv_in_ycrcb(sample),
    .y(y), .cr(cr), .cb(cb), .fvh(fvh), .data_valid(data_valid));

  always @(negedge clk) if (!reset && data_valid) begin
    checks++;
    got++;
    if (src.sent_q.size() == 0) begin
      failures++;
      $display("FAIL pixel with nothing sent t=%0t y=%h fvh=%b got=%0d", $time, y, fvh, got);
    end else begin
      if (y !== src.sent_q[0].y || cr !== src.sent_q[0].cr || cb !== src.sent_q[0].cb ||
          fvh !== {src.sent_q[0].f[0], 2'b00}) begin
        failures++;
        if (failures < 10) $display("FAIL row %0d x %0d: got y%h cr%h cb%h fvh%b exp y%h cr%h cb%h",
                                    src.sent_q[0].row, src.sent_q[0].x, y, cr, cb, fvh,
                                    src.sent_q[0].y, src.sent_q[0].cr, src.sent_q[0].cb);
      end
      void'(src.sent_q.pop_front());
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    reset = 0;
    run = 1;
    wait (frames_sent == 2);
    run = 0;
    repeat (50) @(posedge clk);
    checks++;
    if (got != 2 * 2 * 6 * 32 || src.sent_q.size() > 64) begin
      failures++;
      $display("FAIL pixels out %0d, left %0d", got, src.sent_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

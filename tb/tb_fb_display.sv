// tb_fb_display: the display path reads a model frame buffer (two-cycle read
// latency) filled with a known pattern while a small raster (64 x 6 positions)
// sweeps. It must request exactly one cycle in four, and every pixel it outputs
// must be the luminance of camera pixel (hcount, vcount) from three clocks before.
module tb_fb_display;
  import video_pkg::*;
  localparam int HT = 64, VT = 6;
  logic clk = 0;
  logic [10:0] hcount = 0;
  logic [9:0]  vcount = 0;
  logic disp_req;
  fb_addr_t disp_addr;
  fb_word_t rdata, r1;
  logic [7:0] pixel;
  int checks = 0, failures = 0, reqs = 0, cycles = 0;
  int h_hist [3], v_hist [3];

  always #5 clk = ~clk;

  fb_display #(.H_TOTAL(HT), .V_TOTAL(VT)) dut (.clock_65mhz(clk), .hcount(hcount), .vcount(vcount), .disp_req(disp_req),
    .disp_addr(disp_addr), .zbt_read_data(rdata), .pixel(pixel));

  function automatic logic [7:0] lum(int x, int y); return 8'(x * 5 + y * 17 + 3); endfunction

  function automatic fb_word_t word_at(fb_addr_t a);
    int y, x;
    y = int'(a[18:9]); x = 4 * int'(a[8:0]);
    return {4'b0, lum(x, y), lum(x + 1, y), lum(x + 2, y), lum(x + 3, y), 36'h0};
  endfunction

  // model RAM: read data two cycles after the request
  always @(posedge clk) begin
    r1 <= word_at(disp_addr);
    rdata <= r1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int fr = 0; fr < 3; fr++)
      for (int v = 0; v < VT; v++)
        for (int h = 0; h < HT; h++) begin
          @(negedge clk);
          if (cycles > 8) begin
            checks++;
            if (pixel !== lum(h_hist[2], v_hist[2])) begin
              failures++;
              if (failures < 10) $display("FAIL (%0d,%0d): got %0d exp %0d", h_hist[2], v_hist[2], pixel, lum(h_hist[2], v_hist[2]));
            end
          end
          for (int i = 2; i > 0; i--) begin h_hist[i] = h_hist[i-1]; v_hist[i] = v_hist[i-1]; end
          hcount = 11'(h); vcount = 10'(v);
          h_hist[0] = h; v_hist[0] = v;
          #1;
          if (disp_req) reqs++;
          cycles++;
        end
    checks++;
    if (reqs * 4 != cycles) begin failures++; $display("FAIL %0d requests in %0d cycles", reqs, cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fb_reader: a 12 x 5 image is scanned three times from a model frame buffer
// (two-cycle read latency) while read_success is randomly low about a third of the
// time. The output must be every pixel exactly once per pass, in row-major order,
// each with the word of its own address and read_valid, new_frame exactly on the
// last pixel of a pass, the address advancing only on successful reads, and one
// output per successful read.
module tb_fb_reader;
  import video_pkg::*;
  localparam int W = 12, H = 5;
  logic clk = 0, reset = 1, read_success = 0;
  fb_addr_t addr;
  fb_word_t zbt_data, r1, read_data;
  logic [10:0] rx;
  logic [9:0]  ry;
  logic read_valid, new_frame;
  int checks = 0, failures = 0, ex = 0, ey = 0, passes = 0, stalls = 0, succ = 0, outs = 0;

  always #5 clk = ~clk;

  fb_reader #(.IMG_W_P(W), .IMG_H_P(H)) dut (.clock_65mhz(clk), .reset(reset), .zbt_data(zbt_data),
    .read_success(read_success), .read_address(addr), .read_data(read_data), .read_x(rx),
    .read_y(ry), .read_valid(read_valid), .new_frame(new_frame));

  function automatic fb_word_t word_at(fb_addr_t a);
    return {a, ~a, a, 15'h5A5A};
  endfunction

  always @(posedge clk) begin
    r1 <= word_at(addr);
    zbt_data <= r1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    while (passes < 3) begin
      @(negedge clk);
      if (read_valid) begin
        outs++;
        checks++;
        if (rx != 11'(ex) || ry != 10'(ey) || read_data !== word_at(fb_addr(11'(ex), 10'(ey))) ||
            new_frame != (ex == W - 1 && ey == H - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL got (%0d,%0d) nf%0b exp (%0d,%0d)", rx, ry, new_frame, ex, ey);
        end
        ex++;
        if (ex == W) begin ex = 0; ey++; if (ey == H) begin ey = 0; passes++; end end
      end else begin
        checks++;
        if (new_frame) begin failures++; $display("FAIL new_frame without data"); end
      end
      read_success = ($urandom % 3) != 0;
      #1;
      if (read_success) succ++; else stalls++;
    end
    checks++;
    if (stalls == 0 || succ - outs > 2 || succ - outs < 0) begin
      failures++;
      $display("FAIL successes %0d outputs %0d stalls %0d", succ, outs, stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

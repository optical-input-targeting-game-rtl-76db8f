// tb_fb_writer: feeds two interlaced frames (40 pixels x 5 active lines per field,
// one pixel every two 27 MHz clocks) into the writer, with the 65 MHz side behind
// a model arbiter that takes every fourth cycle for the display, so some writes
// fail and must be repeated. Every accepted write is recorded; at the end each of
// the 10 x 10 words must hold the four Y bytes and the two Cr/Cb pairs of its
// pixels at address {row, x/4} with row = 2*line + field. Retries must have occurred.
module tb_fb_writer;
  import video_pkg::*;
  localparam int W = 40, LINES = 5;
  logic sclk = 0, vclk = 0, reset = 1;
  logic [2:0] fvh = 3'b011;
  logic data_valid = 0;
  logic [7:0] yin = 0, crin = 0, cbin = 0;
  fb_addr_t wa;
  fb_word_t wd;
  logic we, write_failed, write_completed = 0;
  int checks = 0, failures = 0, retries = 0, writes = 0, scyc = 0;
  fb_word_t mem [fb_addr_t];

  always #7.7 sclk = ~sclk;    // ~65 MHz
  always #18.5 vclk = ~vclk;   // 27 MHz

  fb_writer dut (.clock_65mhz(sclk), .reset(reset), .video_clock(vclk), .video_reset(reset),
    .fvh(fvh), .data_valid(data_valid), .yin(yin), .crin(crin), .cbin(cbin),
    .zbt_write_address(wa), .zbt_write_data(wd), .zbt_write_enable(we),
    .write_failed(write_failed), .write_completed(write_completed));

  function automatic logic [7:0] py(int row, int x);  return 8'(x * 7 + row * 13 + 1); endfunction
  function automatic logic [7:0] pcr(int row, int x); return 8'(100 + row * 3 + x / 2); endfunction
  function automatic logic [7:0] pcb(int row, int x); return 8'(50 + row + x); endfunction

  // model arbiter: display owns every fourth cycle
  assign write_failed = we && (scyc % 4 == 0);
  always @(posedge sclk) begin
    scyc <= scyc + 1;
    write_completed <= we && !write_failed;
    if (we && !write_failed) begin mem[wa] = wd; writes++; end
    if (write_failed) retries++;
  end

  task automatic vtick(); @(posedge vclk); #1; endtask

  task automatic send_line(bit f, bit v, int row);
    fvh = {f, v, 1'b1}; data_valid = 0;
    repeat (30) vtick();
    fvh = {f, v, 1'b0};
    if (v) begin repeat (2 * W) vtick(); return; end
    for (int x = 0; x < W; x++) begin
      yin = py(row, x); crin = pcr(row, x & ~1); cbin = pcb(row, x & ~1);
      data_valid = 1; vtick();
      data_valid = 0; vtick();
    end
  endtask

  initial begin
    repeat (200000) @(posedge sclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) vtick();
    reset = 0;
    for (int fr = 0; fr < 2; fr++)
      for (int f = 0; f < 2; f++) begin
        for (int l = 0; l < 3; l++) send_line(f[0], 1'b1, 0);
        for (int l = 0; l < LINES; l++) send_line(f[0], 1'b0, 2 * l + f);
      end
    send_line(1'b1, 1'b1, 0);
    for (int row = 0; row < 2 * LINES; row++)
      for (int k = 0; k < W / 4; k++) begin
        fb_addr_t a;
        fb_word_t e;
        a = fb_addr(XW'(4 * k), YW'(row));
        e = {4'b0, py(row, 4 * k), py(row, 4 * k + 1), py(row, 4 * k + 2), py(row, 4 * k + 3),
             4'b0, pcr(row, 4 * k), pcb(row, 4 * k), pcr(row, 4 * k + 2), pcb(row, 4 * k + 2)};
        checks++;
        if (!mem.exists(a) || mem[a] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d word %0d: %h exp %h", row, k, mem.exists(a) ? mem[a] : '0, e);
        end
      end
    checks++;
    if (mem.size() != 2 * LINES * W / 4 || retries == 0 || writes != 2 * 2 * LINES * W / 4) begin
      failures++;
      $display("FAIL words %0d writes %0d retries %0d", mem.size(), writes, retries);
    end
    $display("writes %0d retries %0d", writes, retries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

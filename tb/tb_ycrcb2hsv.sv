// tb_ycrcb2hsv: feeds one random Y/Cr/Cb pixel per clock (plus pure colours and
// greys) and compares each result, six clocks later, with a floating-point
// BT.601 / HSV reference. RGB must agree within 2 (10-bit scale); S and V within 3
// and H within 3 (modulo 256), the reciprocal table being an approximation.
module tb_ycrcb2hsv;
  logic clk = 0;
  logic [7:0] y = 16, cr = 128, cb = 128;
  logic [9:0] r, g, b;
  logic [7:0] h, s, v;
  int checks = 0, failures = 0;
  logic [23:0] in_hist [8];

  always #5 clk = ~clk;

  ycrcb2hsv dut (.clock(clk), .y(y), .cr(cr), .cb(cb), .r(r), .g(g), .b(b), .h(h), .s(s), .v(v));

  function automatic int clampi(int a, int lo, int hi);
    return a < lo ? lo : (a > hi ? hi : a);
  endfunction

  function automatic int absi(int a);
    return a < 0 ? -a : a;
  endfunction

  task automatic check(logic [23:0] in);
    real yr, crr, cbr, rf, gf, bf, mx, mn, d, hf;
    int er, eg, eb, r8, g8, b8, eh, es, ev, dh;
    yr = real'(in[23:16]) - 16.0; crr = real'(in[15:8]) - 128.0; cbr = real'(in[7:0]) - 128.0;
    rf = 4.0 * (1.164 * yr + 1.596 * crr);
    gf = 4.0 * (1.164 * yr - 0.813 * crr - 0.391 * cbr);
    bf = 4.0 * (1.164 * yr + 2.018 * cbr);
    er = clampi(int'($floor(rf + 0.5)), 0, 1023);
    eg = clampi(int'($floor(gf + 0.5)), 0, 1023);
    eb = clampi(int'($floor(bf + 0.5)), 0, 1023);
    checks++;
    if (absi(int'(r) - er) > 2 || absi(int'(g) - eg) > 2 || absi(int'(b) - eb) > 2) begin
      failures++;
      if (failures < 10) $display("FAIL rgb for %h: got %0d %0d %0d exp %0d %0d %0d", in, r, g, b, er, eg, eb);
    end
    // HSV from the block's own 8-bit RGB so that only the HSV stage is judged here
    r8 = int'(r) / 4; g8 = int'(g) / 4; b8 = int'(b) / 4;
    mx = r8; if (g8 > mx) mx = g8; if (b8 > mx) mx = b8;
    mn = r8; if (g8 < mn) mn = g8; if (b8 < mn) mn = b8;
    d = mx - mn;
    ev = int'(mx);
    if (d == 0) begin eh = 0; es = 0; end
    else begin
      es = clampi(int'(256.0 * d / mx), 0, 255);
      if (mx == r8) hf = 256.0 / 6.0 * (g8 - b8) / d;
      else if (mx == g8) hf = 256.0 / 3.0 + 256.0 / 6.0 * (b8 - r8) / d;
      else hf = 2.0 * 256.0 / 3.0 + 256.0 / 6.0 * (r8 - g8) / d;
      eh = int'($floor(hf));
    end
    dh = (int'(h) - eh) % 256; if (dh < 0) dh += 256; if (dh > 128) dh = 256 - dh;
    checks++;
    if (dh > 3 || absi(int'(s) - es) > 3 || int'(v) != ev) begin
      failures++;
      if (failures < 10) $display("FAIL hsv for %h: got %0d %0d %0d exp %0d %0d %0d", in, h, s, v, eh, es, ev);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (i >= 7) check(in_hist[5]);
      for (int k = 7; k > 0; k--) in_hist[k] = in_hist[k-1];
      case (i % 10)
        0: begin y = 8'(16 + $urandom % 220); cr = 128; cb = 128; end        // grey
        1: begin y = 81; cr = 240; cb = 90; end                                // red
        2: begin y = 145; cr = 34; cb = 54; end                                // green
        default: begin y = 8'($urandom); cr = 8'($urandom); cb = 8'($urandom); end
      endcase
      in_hist[0] = {y, cr, cb};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

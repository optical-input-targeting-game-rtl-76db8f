// ycrcb2hsv: pipelined colour-space converter, 8-bit Y/Cr/Cb in, 10-bit R/G/B and
// 8-bit H/S/V out.
//
// Stage 1 forms the five products of the ITU-R BT.601 conversion in parallel, with
// coefficients scaled by 256 (298, 409, 208, 100, 516). Stage 2 adds them and clips
// to 0..1023, giving R, G and B four times the usual 8-bit scale.
// HSV uses the top 8 bits of R, G, B. Stage 3 finds max, min and their difference
// (delta) and the hue sector, and premultiplies the hue numerator by 43 (one sixth
// of 256). Divisions are avoided: stage 4 looks up f(n) = 256/n in a 256-entry
// table, and stage 5 replaces each a/b by one multiply a*f(b) followed by a right
// shift of 8. The table keeps f(n) with 8 fraction bits (round(65536/n)); with only
// the integer part, b above 128 would give f(b) = 1 and useless quotients. Stage 6
// adds the sector base (0 for red, 85 green, 171 blue) to give H modulo 256;
// S = 256*delta/max clipped to 255; V = max. Grey pixels (delta = 0) get H = S = 0.
// Timing: fully pipelined, one pixel per clock, all six outputs registered and
// aligned, LATENCY = 6 clocks from input to output.
module ycrcb2hsv (
  input  logic       clock,
  input  logic [7:0] y,
  input  logic [7:0] cr,
  input  logic [7:0] cb,
  output logic [9:0] r,
  output logic [9:0] g,
  output logic [9:0] b,
  output logic [7:0] h,
  output logic [7:0] s,
  output logic [7:0] v
);
  // 256/n table
  logic [16:0] recip [256];
  initial begin
    recip[0] = 17'd0;
    for (int n = 1; n < 256; n++) recip[n] = 17'((65536 + n / 2) / n);
  end

  // stage 1: products
  logic signed [18:0] p_y, p_rv, p_gv, p_gu, p_bu;
  always_ff @(posedge clock) begin
    p_y  <= 19'(298 * (32'($signed({1'b0, y})) - 16));
    p_rv <= 19'(409 * (32'($signed({1'b0, cr})) - 128));
    p_gv <= 19'(208 * (32'($signed({1'b0, cr})) - 128));
    p_gu <= 19'(100 * (32'($signed({1'b0, cb})) - 128));
    p_bu <= 19'(516 * (32'($signed({1'b0, cb})) - 128));
  end

  // stage 2: sums and clipping (x4 scale: divide by 64 instead of 256)
  function automatic logic [9:0] clip10(logic signed [19:0] v20);
    logic signed [19:0] q;
    q = (v20 + 20'sd32) >>> 6;
    if (q < 0) return 10'd0;
    if (q > 1023) return 10'd1023;
    return q[9:0];
  endfunction

  logic [9:0] r2, g2, b2;
  always_ff @(posedge clock) begin
    r2 <= clip10(20'(p_y) + 20'(p_rv));
    g2 <= clip10(20'(p_y) - 20'(p_gv) - 20'(p_gu));
    b2 <= clip10(20'(p_y) + 20'(p_bu));
  end

  // stage 3: max, min, sector, hue numerator
  logic [7:0] r8, g8, b8, mx, mn;
  logic [1:0] sector;
  logic signed [9:0] diff;
  always_comb begin
    r8 = r2[9:2];
    g8 = g2[9:2];
    b8 = b2[9:2];
    mx = r8; sector = 2'd0; diff = $signed({2'b0, g8}) - $signed({2'b0, b8});
    if (g8 > mx) begin mx = g8; sector = 2'd1; diff = $signed({2'b0, b8}) - $signed({2'b0, r8}); end
    if (b8 > mx) begin mx = b8; sector = 2'd2; diff = $signed({2'b0, r8}) - $signed({2'b0, g8}); end
    mn = r8;
    if (g8 < mn) mn = g8;
    if (b8 < mn) mn = b8;
  end

  logic [7:0]  mx3, delta3;
  logic [1:0]  sec3;
  logic signed [15:0] hnum3;
  logic [9:0]  r3, g3, b3;
  always_ff @(posedge clock) begin
    mx3    <= mx;
    delta3 <= mx - mn;
    sec3   <= sector;
    hnum3  <= 16'(diff * 43);
    {r3, g3, b3} <= {r2, g2, b2};
  end

  // stage 4: reciprocal look-ups
  logic [16:0] f_delta4, f_max4;
  logic [7:0]  mx4, delta4;
  logic [1:0]  sec4;
  logic signed [15:0] hnum4;
  logic [9:0]  r4, g4, b4;
  always_ff @(posedge clock) begin
    f_delta4 <= recip[delta3];
    f_max4   <= recip[mx3];
    {mx4, delta4, sec4, hnum4} <= {mx3, delta3, sec3, hnum3};
    {r4, g4, b4} <= {r3, g3, b3};
  end

  // stage 5: multiplies replacing the divisions
  logic signed [33:0] hq5;
  logic [24:0] sq5;
  logic [7:0]  mx5, delta5;
  logic [1:0]  sec5;
  logic [9:0]  r5, g5, b5;
  always_ff @(posedge clock) begin
    hq5 <= 34'(hnum4 * $signed({1'b0, f_delta4}));
    sq5 <= 25'(delta4 * f_max4);
    {mx5, delta5, sec5} <= {mx4, delta4, sec4};
    {r5, g5, b5} <= {r4, g4, b4};
  end

  // stage 6: hue sector base, saturation clip
  logic signed [33:0] hshift;
  logic [16:0] sat;
  logic [7:0] base;
  always_comb begin
    hshift = hq5 >>> 16;      // (43*diff) * (256/delta) / 256, 8 fraction bits dropped
    sat    = sq5[24:8];        // delta * (256/max), 8 fraction bits dropped
    case (sec5)
      2'd1:    base = 8'd85;
      2'd2:    base = 8'd171;
      default: base = 8'd0;
    endcase
  end

  always_ff @(posedge clock) begin
    r <= r5; g <= g5; b <= b5;
    v <= mx5;
    if (delta5 == 8'd0) begin
      h <= 8'd0;
      s <= 8'd0;
    end else begin
      h <= base + hshift[7:0];
      s <= (sat > 17'd255) ? 8'd255 : sat[7:0];
    end
  end
endmodule

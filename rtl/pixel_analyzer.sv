// pixel_analyzer: finds the laser dot in the camera image and reports it as a
// screen coordinate.
//
// Pixels arrive from fb_reader (one per cycle with read_valid, gaps allowed). For
// each pixel its luminance byte is taken from the 72-bit word (byte read_x[1:0]).
//  * Average: all luminances of a pass are summed in a SUM_W-bit accumulator; at
//    the end of the pass the top 8 bits of the sum are taken as the average
//    brightness (for 720x460 pixels that is sum/2^19, about 0.63 of the true mean).
//  * Threshold: a pixel is a candidate only if its luminance exceeds the previous
//    pass's average plus the threshold set on the switches.
//  * Dot: the brightest candidate of the pass (first one wins on a tie) is the dot.
// When new_frame marks the last pixel of a pass, the dot's coordinates (if any
// candidate was seen) are latched, the average is updated and the accumulators
// restart; so the output changes only once per pass. The latched coordinates go
// through coord_scaler, which maps the camera image onto 1024x768 (one more clock).
//
// The Y/Cr/Cb of every pixel also feeds a ycrcb2hsv converter; its R/G/B and H/S/V
// outputs (six clocks behind the input pixel, with cvt_valid) are brought out for
// colour-based detection and debugging but are not used by the luminance method.
module pixel_analyzer
  import video_pkg::*;
#(
  parameter int IMG_W_P = IMG_W,
  parameter int IMG_H_P = IMG_H,
  parameter int SUM_W   = $clog2(IMG_W_P * IMG_H_P * 255 + 1)
) (
  input  logic          clock_65mhz,
  input  logic          reset,
  input  fb_word_t      read_data,
  input  logic [XW-1:0] read_x,
  input  logic [YW-1:0] read_y,
  input  logic          read_valid,
  input  logic          new_frame,
  input  logic [7:0]    threshold,
  output logic [XW-1:0] x,
  output logic [YW-1:0] y,
  output logic [7:0]    average_brightness,
  output logic [9:0]    cvt_r,
  output logic [9:0]    cvt_g,
  output logic [9:0]    cvt_b,
  output logic [7:0]    cvt_h,
  output logic [7:0]    cvt_s,
  output logic [7:0]    cvt_v,
  output logic          cvt_valid
);
  logic [7:0]       lum;
  logic [SUM_W-1:0] sum, sum_next;
  logic [7:0]       best_lum;
  logic             found;
  logic [XW-1:0]    best_x, raw_x;
  logic [YW-1:0]    best_y, raw_y;
  logic             candidate;
  logic [5:0]       valid_pipe;

  always_comb begin
    lum       = word_luma(read_data, read_x[1:0]);
    sum_next  = sum + SUM_W'(lum);
    candidate = ({1'b0, lum} > {1'b0, average_brightness} + {1'b0, threshold}) &&
                (!found || lum > best_lum);
  end

  always_ff @(posedge clock_65mhz) begin
    if (reset) begin
      sum      <= '0;
      best_lum <= '0;
      found    <= 1'b0;
      best_x   <= '0;
      best_y   <= '0;
      raw_x    <= '0;
      raw_y    <= '0;
      average_brightness <= '0;
    end else if (read_valid) begin
      if (new_frame) begin
        average_brightness <= sum_next[SUM_W-1 -: 8];
        sum      <= '0;
        found    <= 1'b0;
        best_lum <= '0;
        if (candidate) begin
          raw_x <= read_x;
          raw_y <= read_y;
        end else if (found) begin
          raw_x <= best_x;
          raw_y <= best_y;
        end
      end else begin
        sum <= sum_next;
        if (candidate) begin
          found    <= 1'b1;
          best_lum <= lum;
          best_x   <= read_x;
          best_y   <= read_y;
        end
      end
    end
  end

  coord_scaler #(.IN_W(IMG_W_P), .IN_H(IMG_H_P)) scaler (
    .clk(clock_65mhz), .x_in(raw_x), .y_in(raw_y), .x_out(x), .y_out(y));

  ycrcb2hsv converter (
    .clock(clock_65mhz),
    .y(lum), .cr(word_cr(read_data, read_x[1:0])), .cb(word_cb(read_data, read_x[1:0])),
    .r(cvt_r), .g(cvt_g), .b(cvt_b), .h(cvt_h), .s(cvt_s), .v(cvt_v));

  always_ff @(posedge clock_65mhz) begin
    if (reset) valid_pipe <= '0;
    else       valid_pipe <= {valid_pipe[4:0], read_valid};
  end
  assign cvt_valid = valid_pipe[5];
endmodule

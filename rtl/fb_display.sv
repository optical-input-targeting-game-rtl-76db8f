// fb_display: shows the camera image from the frame buffer on the VGA screen, as a
// grey-scale picture of the luminance, for setting up and debugging the camera.
//
// The frame buffer is read in exactly one of every four clocks (hcount[1:0] = 0),
// each read fetching the word of four pixels for the next group of four columns:
// address {vcount, hcount[10:2] + 1}; the last group of a line (H_TOTAL is the
// line length of the xvga raster) fetches word 0 of the next line. The word returns two clocks later and is
// parked; at the start of its group it moves to the shift register from which the
// four luminance bytes are shown in turn. Timing: pixel is registered and belongs to
// the hcount/vcount presented three clocks earlier, the same delay as the game's
// pixel output, so the two can share the sync signals.
module fb_display
  import video_pkg::*;
#(
  parameter int H_TOTAL = 1344,
  parameter int V_TOTAL = 806
) (
  input  logic          clock_65mhz,
  input  logic [10:0]   hcount,
  input  logic [9:0]    vcount,
  output logic          disp_req,
  output fb_addr_t      disp_addr,
  input  fb_word_t      zbt_read_data,
  output logic [7:0]    pixel
);
  logic [2:0] req_q;
  fb_word_t   next_word, shown;
  logic [7:0] p1, p2;

  always_comb begin
    disp_req  = (hcount[1:0] == 2'd0);
    if (int'(hcount) >= H_TOTAL - 4)
      disp_addr = {(int'(vcount) == V_TOTAL - 1) ? 10'd0 : vcount + 10'd1, 9'd0};
    else
      disp_addr = {vcount, hcount[10:2] + 9'd1};
  end

  always_ff @(posedge clock_65mhz) begin
    req_q <= {req_q[1:0], disp_req};
    if (req_q[1]) next_word <= zbt_read_data;   // data of the read two cycles ago
    if (hcount[1:0] == 2'd3) shown <= next_word;
    p1    <= word_luma(shown, hcount[1:0]);
    p2    <= p1;
    pixel <= p2;
  end
endmodule

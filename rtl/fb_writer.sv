// fb_writer: collects camera pixels into 72-bit frame buffer words and writes them.
//
// Video clock side (27 MHz): pixels arrive from ntsc_decoder with data_valid. A
// column counter counts pixels along the active line; it is cleared while H is set,
// and the line counter advances at the end of each active line and is cleared
// during vertical blanking. The two interlaced fields are woven into one image:
// frame row = {line, field}. Four consecutive pixels fill one word: their four Y
// bytes go to the luminance half and the Cr/Cb of pixels 0 and 2 (each shared with
// its neighbour) to the chrominance half (layout in video_pkg). When the fourth
// pixel arrives the word and its address are frozen in a holding register and a
// toggle flag flips.
//
// System clock side (65 MHz): the toggle passes through a two-flip-flop
// synchroniser; its change marks a new word pending, which is then written with
// zbt_write_enable held high. The frame buffer arbiter answers in the same cycle:
// write_failed high means the display reader took the frame buffer this cycle and
// the write is repeated in the next one. write_completed, one cycle later, confirms
// each accepted write (checked by an assertion). A word takes at least eight video
// clocks (about 19 system clocks) to assemble, so the holding register is stable
// long before the system side samples it.
// The top four bits of each 36-bit half of a word are always zero: the pixel data
// fills 32 of the 36 bits of each SRAM.
module fb_writer
  import video_pkg::*;
(
  input  logic       clock_65mhz,
  input  logic       reset,
  input  logic       video_clock,
  input  logic       video_reset,
  input  logic [2:0] fvh,
  input  logic       data_valid,
  input  logic [7:0] yin,
  input  logic [7:0] crin,
  input  logic [7:0] cbin,
  output fb_addr_t   zbt_write_address,
  output fb_word_t   zbt_write_data,
  output logic       zbt_write_enable,
  input  logic       write_failed,
  input  logic       write_completed
);
  // ---------------- video clock domain ----------------
  logic [XW-1:0] col;
  logic [YW-2:0] line;
  logic          h_q;
  logic [31:0]   luma, chroma;
  fb_word_t      hold_data;
  fb_addr_t      hold_addr;
  logic          toggle;
  logic [YW-1:0] row;

  assign row = {line, fvh[2]};

  always_ff @(posedge video_clock) begin
    if (video_reset) begin
      col <= '0; line <= '0; h_q <= 1'b1;
      luma <= '0; chroma <= '0;
      hold_data <= '0; hold_addr <= '0; toggle <= 1'b0;
    end else begin
      h_q <= fvh[0];
      if (fvh[1]) line <= '0;
      else if (fvh[0] && !h_q && col != '0) line <= line + 1'b1;
      if (fvh[0]) col <= '0;
      else if (data_valid) begin
        col <= col + 1'b1;
        luma[8 * (3 - int'(col[1:0])) +: 8] <= yin;
        if (col[1:0] == 2'd0) chroma[31:16] <= {crin, cbin};
        if (col[1:0] == 2'd2) chroma[15:0]  <= {crin, cbin};
        if (col[1:0] == 2'd3) begin
          hold_data <= {4'b0, luma[31:8], yin, 4'b0, chroma};
          hold_addr <= fb_addr(col, row);
          toggle    <= !toggle;
        end
      end
    end
  end

  // ---------------- system clock domain ----------------
  logic [2:0] tsync;
  logic       pending;

  always_ff @(posedge clock_65mhz) begin
    if (reset) begin
      tsync   <= '0;
      pending <= 1'b0;
      zbt_write_address <= '0;
      zbt_write_data    <= '0;
    end else begin
      tsync <= {tsync[1:0], toggle};
      if (tsync[2] != tsync[1]) begin
        pending <= 1'b1;
        zbt_write_address <= hold_addr;
        zbt_write_data    <= hold_data;
      end else if (pending && !write_failed) begin
        pending <= 1'b0;
      end
    end
  end

  assign zbt_write_enable = pending;

  // every accepted write is confirmed by write_completed one cycle later
  logic accepted_q;
  always_ff @(posedge clock_65mhz)
    accepted_q <= !reset && pending && !write_failed;

  a_completed: assert property (@(posedge clock_65mhz) disable iff (reset)
    write_completed == accepted_q);

endmodule

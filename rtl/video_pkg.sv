// video_pkg: sizes and the frame buffer word layout shared by the camera half.
//
// The frame buffer is two 36-bit ZBT SRAMs side by side, one 72-bit word per
// address. A word holds four horizontally adjacent camera pixels:
//   bits 71:36  luminance RAM   {4'b0, Y(4k), Y(4k+1), Y(4k+2), Y(4k+3)}
//   bits 35:0   chrominance RAM {4'b0, Cr(4k,4k+1), Cb(4k,4k+1), Cr(4k+2,4k+3), Cb(4k+2,4k+3)}
// Each chroma pair is shared by two neighbouring pixels, so four pixels need 8 bytes.
// Pixel (x, y) lives in word {y[9:0], x[10:2]} (19-bit address), byte x[1:0].
package video_pkg;

  localparam int FB_AW = 19;
  localparam int FB_DW = 72;
  localparam int XW = 11;
  localparam int YW = 10;

  // Usable camera image scanned by the frame buffer reader
  localparam int IMG_W = 720;
  localparam int IMG_H = 460;

  typedef logic [FB_AW-1:0] fb_addr_t;
  typedef logic [FB_DW-1:0] fb_word_t;

  function automatic fb_addr_t fb_addr(logic [XW-1:0] x, logic [YW-1:0] y);
    return {y, x[XW-1:2]};
  endfunction

  function automatic logic [7:0] word_luma(fb_word_t w, logic [1:0] idx);
    return w[36 + 8 * (3 - int'(idx)) +: 8];
  endfunction

  function automatic logic [7:0] word_cr(fb_word_t w, logic [1:0] idx);
    return idx[1] ? w[15:8] : w[31:24];
  endfunction

  function automatic logic [7:0] word_cb(fb_word_t w, logic [1:0] idx);
    return idx[1] ? w[7:0] : w[23:16];
  endfunction

endpackage

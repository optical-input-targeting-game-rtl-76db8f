// sprite_rom: read-only block RAM holding the frames of one sprite, 4 bits per pixel.
//
// Depth is frames*width*height of the chosen artwork; frames are stored one after
// another, each row by row. The contents are computed at elaboration from
// duck_hunt_pkg::art_pixel(), which stands in for the bitmap files of the original.
// Timing: synchronous read, dout shows mem[addr] one clock after addr is sampled,
// as a single-port block RAM does.
module sprite_rom
  import duck_hunt_pkg::*;
#(
  parameter art_e ART = ART_BUSH,
  parameter int   AW  = 13
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [3:0]    dout
);
  localparam int W = art_width(ART);
  localparam int H = art_height(ART);
  localparam int DEPTH = art_frames(ART) * W * H;

  logic [3:0] mem [DEPTH];

  initial begin
    for (int f = 0; f < art_frames(ART); f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          mem[f * W * H + r * W + c] = art_pixel(ART, f, r, c);
  end

  always_ff @(posedge clk)
    dout <= (int'(addr) < DEPTH) ? mem[$clog2(DEPTH)'(addr)] : 4'd0;
endmodule

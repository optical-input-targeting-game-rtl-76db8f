// stationary_sprite: draws one fixed background sprite (the bush or the tree).
//
// The sprite occupies columns MY_X..MY_X+W-1 and rows MY_Y..MY_Y+H-1 of the screen.
// Because the raster visits the sprite's pixels in the same row-major order in which
// they are stored, no multiplier is needed: an address register starts at zero and
// is incremented once for every raster position inside the sprite. It is cleared
// again whenever the raster is on a line outside the sprite's rows, ready for the
// next frame. Outside the sprite the output is 0 (transparent).
// Timing: pixel is registered and belongs to the hcount/vcount presented two
// clocks earlier (one clock of address, one clock of ROM read).
module stationary_sprite
  import duck_hunt_pkg::*;
#(
  parameter art_e ART  = ART_BUSH,
  parameter int   MY_X = 700,
  parameter int   MY_Y = 600
) (
  input  logic          vclock,
  input  logic [HW-1:0] hcount,
  input  logic [VW-1:0] vcount,
  output logic [3:0]    pixel
);
  localparam int W  = art_width(ART);
  localparam int H  = art_height(ART);
  localparam int AW = $clog2(W * H);

  logic [AW-1:0] addr;
  logic [3:0]    dout;
  logic          in_rows, in_box, in_box_q;

  sprite_rom #(.ART(ART), .AW(AW)) rom (.clk(vclock), .addr(addr), .dout(dout));

  always_comb begin
    in_rows = (int'(vcount) >= MY_Y) && (int'(vcount) < MY_Y + H);
    in_box  = in_rows && (int'(hcount) >= MY_X) && (int'(hcount) < MY_X + W);
  end

  always_ff @(posedge vclock) begin
    if (!in_rows)    addr <= '0;
    else if (in_box) addr <= addr + 1'b1;
    in_box_q <= in_box;
    pixel    <= in_box_q ? dout : 4'd0;
  end
endmodule

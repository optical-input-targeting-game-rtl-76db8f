// shot_sprite: the ammunition panel, three bullets of which the unused ones are white.
//
// A stationary 60x30 sprite (same row-major address counter as stationary_sprite).
// The input shots is the number of shots left for the current duck (0..3). It is
// expanded into a three-bit register, bit k set when k < shots, and each white
// (colour 15) pixel of bullet k is ANDed with bit k: remaining bullets are white,
// spent ones black. The bullets end at columns S1, S2 and WIDTH. Timing: pixel is
// registered and belongs to the hcount/vcount presented two clocks earlier.
module shot_sprite
  import duck_hunt_pkg::*;
#(
  parameter int MY_X = 40,
  parameter int MY_Y = 700,
  parameter int S1 = SHOTS_S1,
  parameter int S2 = SHOTS_S2
) (
  input  logic          vclock,
  input  logic [HW-1:0] hcount,
  input  logic [VW-1:0] vcount,
  input  logic [1:0]    shots,
  output logic [3:0]    pixel
);
  localparam int W  = SHOTS_W;
  localparam int H  = SHOTS_H;
  localparam int AW = $clog2(W * H);

  logic [AW-1:0] addr;
  logic [3:0]    dout;
  logic          in_rows, in_box, in_box_q;
  logic [1:0]    section, section_q;
  logic [2:0]    bullets;

  sprite_rom #(.ART(ART_SHOTS), .AW(AW)) rom (.clk(vclock), .addr(addr), .dout(dout));

  always_comb begin
    in_rows = (int'(vcount) >= MY_Y) && (int'(vcount) < MY_Y + H);
    in_box  = in_rows && (int'(hcount) >= MY_X) && (int'(hcount) < MY_X + W);
    if (int'(hcount) < MY_X + S1)      section = 2'd0;
    else if (int'(hcount) < MY_X + S2) section = 2'd1;
    else                               section = 2'd2;
    for (int k = 0; k < 3; k++) bullets[k] = (k < int'(shots));
  end

  always_ff @(posedge vclock) begin
    if (!in_rows)    addr <= '0;
    else if (in_box) addr <= addr + 1'b1;
    in_box_q  <= in_box;
    section_q <= section;
    if (!in_box_q)            pixel <= 4'd0;
    else if (dout == C_WHITE) pixel <= dout & {4{bullets[section_q]}};
    else                      pixel <= dout;
  end
endmodule

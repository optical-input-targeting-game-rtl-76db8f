// score_sprite: the score panel, four duck marks that light up for ducks hit.
//
// A stationary 90x60 sprite (same row-major address counter as stationary_sprite)
// whose white (colour 15) pixels are masked by the score register: the panel is cut
// into four columns ending at D1, D2, D3 and WIDTH, and a white pixel in column k is
// shown white when score[k] is 1 and black (0) when it is 0. Other colours pass
// unchanged. Timing: pixel is registered and belongs to the hcount/vcount presented
// two clocks earlier.
module score_sprite
  import duck_hunt_pkg::*;
#(
  parameter int MY_X = 900,
  parameter int MY_Y = 700,
  parameter int D1 = SCORE_D1,
  parameter int D2 = SCORE_D2,
  parameter int D3 = SCORE_D3
) (
  input  logic          vclock,
  input  logic [HW-1:0] hcount,
  input  logic [VW-1:0] vcount,
  input  logic [3:0]    score,
  output logic [3:0]    pixel
);
  localparam int W  = SCORE_W;
  localparam int H  = SCORE_H;
  localparam int AW = $clog2(W * H);

  logic [AW-1:0] addr;
  logic [3:0]    dout;
  logic          in_rows, in_box, in_box_q;
  logic [1:0]    section, section_q;

  sprite_rom #(.ART(ART_SCORE), .AW(AW)) rom (.clk(vclock), .addr(addr), .dout(dout));

  always_comb begin
    in_rows = (int'(vcount) >= MY_Y) && (int'(vcount) < MY_Y + H);
    in_box  = in_rows && (int'(hcount) >= MY_X) && (int'(hcount) < MY_X + W);
    if (int'(hcount) < MY_X + D1)      section = 2'd0;
    else if (int'(hcount) < MY_X + D2) section = 2'd1;
    else if (int'(hcount) < MY_X + D3) section = 2'd2;
    else                               section = 2'd3;
  end

  always_ff @(posedge vclock) begin
    if (!in_rows)    addr <= '0;
    else if (in_box) addr <= addr + 1'b1;
    in_box_q  <= in_box;
    section_q <= section;
    if (!in_box_q)            pixel <= 4'd0;
    else if (dout == C_WHITE) pixel <= dout & {4{score[section_q]}};
    else                      pixel <= dout;
  end
endmodule

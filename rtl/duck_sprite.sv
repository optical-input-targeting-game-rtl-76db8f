// duck_sprite: the moving, flapping duck.
//
// Two sprite ROMs hold the artwork: three 30x30 flying frames and two 30x30
// falling frames, each frame 900 locations after the previous one. duck_no is the
// start address of the frame being shown; every enable pulse from the internal
// divider advances it by 900 (flying: 0, 900, 1800, 0, ...; falling: 0, 900, 0, ...),
// which animates the wings or the tumble. The frame counter of the set that is not
// in use is held at zero.
//
// The duck faces right in the ROM. To draw it facing left the rows are read back
// to front: a column counter pix runs 0..W-1 and a row counter line starts at W-1
// and steps by W at the end of each sprite row, so line-pix walks each stored row
// in reverse and line-(W-1)+pix walks it forwards. Both counters restart whenever
// the raster is on a line outside the duck's rows.
//
// Interface: x, y are the duck's top-left corner; dead selects the falling frames;
// orientation=1 mirrors the image. Timing: pixel is registered and belongs to the
// hcount/vcount presented two clocks earlier; 0 means transparent.
module duck_sprite
  import duck_hunt_pkg::*;
#(
  parameter int          WIDTH     = DUCK_W,
  parameter int          HEIGHT    = DUCK_H,
  parameter int unsigned DIV_COUNT = 16_250_000
) (
  input  logic          vclock,
  input  logic          rst,
  input  logic [HW-1:0] x,
  input  logic [VW-1:0] y,
  input  logic [HW-1:0] hcount,
  input  logic [VW-1:0] vcount,
  input  logic          dead,
  input  logic          orientation,
  output logic [3:0]    pixel
);
  localparam int FRAME = WIDTH * HEIGHT;
  localparam int LIVE_AW = $clog2(3 * FRAME);
  localparam int DEAD_AW = $clog2(2 * FRAME);

  logic        enbl;
  logic [LIVE_AW-1:0] fduck_no, faddr;
  logic [DEAD_AW-1:0] dduck_no, daddr;
  logic [LIVE_AW-1:0] line, line_fwd;
  logic [$clog2(WIDTH)-1:0] pix;
  logic [LIVE_AW-1:0] offset;
  logic [3:0]  fdout, ddout;
  logic        in_rows, in_box, in_box_q, dead_q;

  divider #(.COUNT(DIV_COUNT)) duckdivider (.clk(vclock), .rst(rst), .enbl(enbl));

  sprite_rom #(.ART(ART_DUCK_LIVE), .AW(LIVE_AW)) live_rom (.clk(vclock), .addr(faddr), .dout(fdout));
  sprite_rom #(.ART(ART_DUCK_DEAD), .AW(DEAD_AW)) dead_rom (.clk(vclock), .addr(daddr), .dout(ddout));

  always_comb begin
    in_rows  = ({1'b0, vcount} >= {1'b0, y}) && (int'(vcount) < int'(y) + HEIGHT);
    in_box   = in_rows && ({1'b0, hcount} >= {1'b0, x}) && (int'(hcount) < int'(x) + WIDTH);
    line_fwd = line - LIVE_AW'(WIDTH - 1);
    offset   = orientation ? (line - LIVE_AW'(pix)) : (line_fwd + LIVE_AW'(pix));
    faddr    = fduck_no + offset;
    daddr    = dduck_no + DEAD_AW'(offset);
  end

  // frame selection
  always_ff @(posedge vclock) begin
    if (rst) begin
      fduck_no <= '0;
      dduck_no <= '0;
    end else if (dead) begin
      fduck_no <= '0;
      if (enbl) dduck_no <= (dduck_no == DEAD_AW'(FRAME)) ? '0 : DEAD_AW'(FRAME);
    end else begin
      dduck_no <= '0;
      if (enbl) fduck_no <= (fduck_no == LIVE_AW'(2 * FRAME)) ? '0 : fduck_no + LIVE_AW'(FRAME);
    end
  end

  // raster position inside the sprite
  always_ff @(posedge vclock) begin
    if (!in_rows) begin
      line <= LIVE_AW'(WIDTH - 1);
      pix  <= '0;
    end else if (in_box) begin
      if (int'(pix) == WIDTH - 1) begin
        pix  <= '0;
        line <= line + LIVE_AW'(WIDTH);
      end else begin
        pix <= pix + 1'b1;
      end
    end
    in_box_q <= in_box;
    dead_q   <= dead;
    pixel    <= !in_box_q ? 4'd0 : (dead_q ? ddout : fdout);
  end
endmodule

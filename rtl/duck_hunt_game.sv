// duck_hunt_game: the game logic and the pixel priority multiplexer.
//
// Once per video frame (on the falling edge of the active-low vsync) the game state
// advances:
//  * A flying duck moves PSPEED pixels diagonally. Direction is held in two bits
//    (xdir, ydir; 1 = subtract PSPEED, i.e. left / up). It bounces off the left,
//    right and top edges and off the HORIZON line above the score panels. When a
//    subtraction would pass zero the coordinate is set to PSPEED-1 instead, so it
//    never wraps to a large value.
//  * Each top bounce increments bounces. Reaching the top again with bounces = 3
//    makes the duck fly away: its score bit is cleared and a new duck starts.
//  * The fire button is sampled once per frame; a rising level gives a one-frame
//    bullet. With shots left, a bullet uses one shot and, if the cursor lies in the
//    duck's 30x30 square, kills it and sets its score bit.
//  * A dead duck drops PSPEED per frame until it reaches HORIZON; then a new duck.
// A new duck restarts from START_X/START_Y moving up-right with three shots and
// increments totalducks; its score bit is score[totalducks[1:0]]. Reset also clears
// the score and totalducks.
//
// Every clock, the output pixel is chosen from the sprite pixels: the cursor dot
// first, then the duck where it is not transparent, otherwise the OR of the
// stationary sprites (bush, tree, score and shots never overlap).
// Timing: sprite pixels arrive two clocks after hcount/vcount; the pixel output is
// registered once more, so pixel, phsync, pvsync and pblank are all three clocks
// behind hcount/vcount, hsync, vsync and blank.
module duck_hunt_game
  import duck_hunt_pkg::*;
#(
  parameter int PSPEED  = 4,
  parameter int HORIZON = 640,
  parameter int START_X = 100,
  parameter int START_Y = 600,
  parameter int CURSOR_SIZE = 4
) (
  input  logic          vclock,
  input  logic          reset,
  input  logic [HW-1:0] hcount,
  input  logic [VW-1:0] vcount,
  input  logic          hsync,
  input  logic          vsync,
  input  logic          blank,
  input  logic          shot,
  input  logic [HW-1:0] cursor_x,
  input  logic [VW-1:0] cursor_y,
  input  logic [3:0]    bush_pixel,
  input  logic [3:0]    tree_pixel,
  input  logic [3:0]    score_pixel,
  input  logic [3:0]    shot_pixel,
  input  logic [3:0]    duck_pixel,
  output logic          phsync,
  output logic          pvsync,
  output logic          pblank,
  output logic [3:0]    pixel,
  output logic [HW-1:0] duck_x,
  output logic [VW-1:0] duck_y,
  output logic          dead,
  output logic          orientation,
  output logic [3:0]    score,
  output logic [1:0]    shots,
  output logic [7:0]    totalducks,
  output logic [1:0]    bounces
);
  localparam int XMAX = SCREEN_W - DUCK_W;   // rightmost duck x

  logic vsync_q, frame, shot_q, bullet;
  logic xdir, ydir;
  logic hit;
  logic [2:0] hs_d, vs_d, bl_d;
  logic [HW-1:0] h_d1, h_d2;
  logic [VW-1:0] v_d1, v_d2;
  logic cursor_here;

  assign orientation = xdir;

  always_comb begin
    frame  = !vsync && vsync_q;              // vsync falling edge
    bullet = frame && shot && !shot_q;
    hit = ({1'b0, cursor_x} >= {1'b0, duck_x}) && (int'(cursor_x) < int'(duck_x) + DUCK_W) &&
          ({1'b0, cursor_y} >= {1'b0, duck_y}) && (int'(cursor_y) < int'(duck_y) + DUCK_H);
  end

  always_ff @(posedge vclock) begin
    if (reset) begin
      vsync_q <= 1'b1;
      shot_q  <= 1'b0;
    end else begin
      vsync_q <= vsync;
      if (frame) shot_q <= shot;
    end
  end

  // Frame-rate game state
  always_ff @(posedge vclock) begin
    if (reset) begin
      duck_x     <= HW'(START_X);
      duck_y     <= VW'(START_Y);
      xdir       <= 1'b0;
      ydir       <= 1'b1;
      bounces    <= '0;
      dead       <= 1'b0;
      shots      <= 2'd3;
      score      <= '0;
      totalducks <= '0;
    end else if (frame) begin
      logic new_duck;
      new_duck = 1'b0;
      if (dead) begin
        if (int'(duck_y) + PSPEED >= HORIZON) new_duck = 1'b1;
        else duck_y <= duck_y + VW'(PSPEED);
      end else if (bullet && shots != 2'd0) begin
        shots <= shots - 1'b1;
        if (hit) begin
          dead <= 1'b1;
          score[totalducks[1:0]] <= 1'b1;
        end
      end else begin
        // horizontal
        if (xdir) begin
          if (int'(duck_x) < PSPEED) begin
            duck_x <= HW'(PSPEED - 1);
            xdir   <= 1'b0;
          end else duck_x <= duck_x - HW'(PSPEED);
        end else begin
          if (int'(duck_x) + PSPEED >= XMAX) xdir <= 1'b1;
          else duck_x <= duck_x + HW'(PSPEED);
        end
        // vertical
        if (ydir) begin
          if (int'(duck_y) < PSPEED) begin
            if (bounces == 2'd3) begin
              new_duck = 1'b1;
              score[totalducks[1:0]] <= 1'b0;
            end else begin
              bounces <= bounces + 1'b1;
              duck_y  <= VW'(PSPEED - 1);
              ydir    <= 1'b0;
            end
          end else duck_y <= duck_y - VW'(PSPEED);
        end else begin
          if (int'(duck_y) + PSPEED >= HORIZON) ydir <= 1'b1;
          else duck_y <= duck_y + VW'(PSPEED);
        end
      end
      if (new_duck) begin
        duck_x     <= HW'(START_X);
        duck_y     <= VW'(START_Y);
        xdir       <= 1'b0;
        ydir       <= 1'b1;
        bounces    <= '0;
        dead       <= 1'b0;
        shots      <= 2'd3;
        totalducks <= totalducks + 1'b1;
      end
    end
  end

  // Pixel priority, aligned with the two-clock sprite latency
  always_comb
    cursor_here = ({1'b0, h_d2} >= {1'b0, cursor_x}) && (int'(h_d2) < int'(cursor_x) + CURSOR_SIZE) &&
                  ({1'b0, v_d2} >= {1'b0, cursor_y}) && (int'(v_d2) < int'(cursor_y) + CURSOR_SIZE);

  always_ff @(posedge vclock) begin
    h_d1 <= hcount;
    h_d2 <= h_d1;
    v_d1 <= vcount;
    v_d2 <= v_d1;
    hs_d <= {hs_d[1:0], hsync};
    vs_d <= {vs_d[1:0], vsync};
    bl_d <= {bl_d[1:0], blank};
    if (cursor_here)              pixel <= C_ORANGE_RED;
    else if (duck_pixel != 4'd0)  pixel <= duck_pixel;
    else                          pixel <= bush_pixel | tree_pixel | score_pixel | shot_pixel;
  end

  assign phsync = hs_d[2];
  assign pvsync = vs_d[2];
  assign pblank = bl_d[2];
endmodule

// duck_hunt_pkg: constants and sprite artwork shared by the game half of the design.
//
// The game draws on a 1024x768 XVGA screen with 4-bit indexed colour. Every sprite
// ROM is 4 bits wide and holds its frames one after another, row by row, so a
// pixel (row, col) of frame f sits at address f*W*H + row*W + col.
//
// The original game used bitmaps of the NES Duck Hunt characters; those images are
// not part of this RTL. The art_pixel() function below draws simple stand-in images
// of the same sizes (ducks 30x30, three flying frames and two falling frames, a
// 90x60 score panel with four duck marks, a shots panel with three bullets, a bush
// and a tree). Replacing art_pixel() changes the pictures without touching any
// addressing logic. Colour 0 is transparent, colour 15 is white.
package duck_hunt_pkg;

  localparam int SCREEN_W = 1024;
  localparam int SCREEN_H = 768;
  localparam int HW = 11;   // hcount / x width
  localparam int VW = 10;   // vcount / y width

  // Palette indices (see look_up_table)
  localparam logic [3:0] C_TRANSPARENT = 4'd0;
  localparam logic [3:0] C_RED_BROWN   = 4'd1;
  localparam logic [3:0] C_GREEN       = 4'd2;
  localparam logic [3:0] C_DARK_BLUE   = 4'd4;
  localparam logic [3:0] C_DARK_GREY   = 4'd7;
  localparam logic [3:0] C_LIGHT_GREY  = 4'd8;
  localparam logic [3:0] C_ORANGE_RED  = 4'd9;
  localparam logic [3:0] C_VIVID_GREEN = 4'd10;
  localparam logic [3:0] C_WHITE       = 4'd15;

  typedef enum logic [2:0] {
    ART_BUSH, ART_TREE, ART_SCORE, ART_SHOTS, ART_DUCK_LIVE, ART_DUCK_DEAD
  } art_e;

  // Duck sprite size and frame step (30x30 = 900 locations per frame)
  localparam int DUCK_W = 30;
  localparam int DUCK_H = 30;

  // Score panel: 90x60, the four duck marks end at columns D1, D2, D3 and WIDTH
  localparam int SCORE_W = 90;
  localparam int SCORE_H = 60;
  localparam int SCORE_D1 = 32;
  localparam int SCORE_D2 = 44;
  localparam int SCORE_D3 = 56;

  // Shots panel: 60x30, three bullets ending at columns S1, S2 and WIDTH
  localparam int SHOTS_W = 60;
  localparam int SHOTS_H = 30;
  localparam int SHOTS_S1 = 20;
  localparam int SHOTS_S2 = 40;

  localparam int BUSH_W = 64;
  localparam int BUSH_H = 40;
  localparam int TREE_W = 80;
  localparam int TREE_H = 160;

  function automatic int art_width(art_e a);
    case (a)
      ART_BUSH:  return BUSH_W;
      ART_TREE:  return TREE_W;
      ART_SCORE: return SCORE_W;
      ART_SHOTS: return SHOTS_W;
      default:   return DUCK_W;
    endcase
  endfunction

  function automatic int art_height(art_e a);
    case (a)
      ART_BUSH:  return BUSH_H;
      ART_TREE:  return TREE_H;
      ART_SCORE: return SCORE_H;
      ART_SHOTS: return SHOTS_H;
      default:   return DUCK_H;
    endcase
  endfunction

  function automatic int art_frames(art_e a);
    case (a)
      ART_DUCK_LIVE: return 3;
      ART_DUCK_DEAD: return 2;
      default:       return 1;
    endcase
  endfunction

  // True when (r,c) lies inside the ellipse centred (cr,cc) with radii (ar,ac).
  function automatic bit in_ellipse(int r, int c, int cr, int cc, int ar, int ac);
    return (r - cr) * (r - cr) * ac * ac + (c - cc) * (c - cc) * ar * ar <= ar * ar * ac * ac;
  endfunction

  // Stand-in artwork. Ducks face right in the ROM (head on the right-hand side).
  function automatic logic [3:0] art_pixel(art_e a, int frame, int r, int c);
    logic [3:0] p;
    p = C_TRANSPARENT;
    case (a)
      ART_BUSH:
        if (in_ellipse(r, c, BUSH_H, BUSH_W / 2, BUSH_H, BUSH_W / 2))
          p = ((r + c) % 4 == 0) ? C_VIVID_GREEN : C_GREEN;
      ART_TREE:
        if (r < 100) begin
          if (in_ellipse(r, c, 50, 40, 49, 39))
            p = ((r * 3 + c) % 5 == 0) ? C_VIVID_GREEN : C_GREEN;
        end else if (c >= 32 && c < 48) p = C_RED_BROWN;
      ART_SCORE: begin
        int s, e;
        if (c < SCORE_D1) begin s = 0; e = SCORE_D1; end
        else if (c < SCORE_D2) begin s = SCORE_D1; e = SCORE_D2; end
        else if (c < SCORE_D3) begin s = SCORE_D2; e = SCORE_D3; end
        else begin s = SCORE_D3; e = SCORE_W; end
        p = C_DARK_GREY;
        if (r >= 20 && r < 40 && c >= s + 2 && c < e - 2) p = C_WHITE;
      end
      ART_SHOTS: begin
        int cc;
        cc = (c < SHOTS_S1) ? SHOTS_S1 / 2 :
             (c < SHOTS_S2) ? (SHOTS_S1 + SHOTS_S2) / 2 : (SHOTS_S2 + SHOTS_W) / 2;
        p = in_ellipse(r, c, SHOTS_H / 2, cc, 7, 7) ? C_WHITE : C_DARK_GREY;
      end
      ART_DUCK_LIVE: begin
        if (in_ellipse(r, c, 17, 14, 6, 10)) p = C_DARK_BLUE;
        if (in_ellipse(r, c, 8, 24, 4, 4)) p = C_GREEN;
        if (r == 7 && c == 25) p = C_WHITE;
        if (r >= 8 && r < 10 && c >= 28) p = C_RED_BROWN;
        case (frame)
          0: if (r >= 2 && r < 12 && c >= 8 && c < 8 + (12 - r)) p = C_LIGHT_GREY;
          1: if (r >= 14 && r < 18 && c >= 3 && c < 16) p = C_LIGHT_GREY;
          default: if (r >= 20 && r < 29 && c >= 8 && c < 8 + (r - 19)) p = C_LIGHT_GREY;
        endcase
      end
      default: begin // ART_DUCK_DEAD: falling duck, head swaps ends between frames
        if (in_ellipse(r, c, 15, 14, 10, 6)) p = C_DARK_BLUE;
        if (frame == 0) begin
          if (in_ellipse(r, c, 26, 17, 3, 3)) p = C_GREEN;
        end else begin
          if (in_ellipse(r, c, 4, 11, 3, 3)) p = C_GREEN;
        end
        if (r >= 12 && r < 16 && c >= 22) p = C_LIGHT_GREY;
      end
    endcase
    return p;
  endfunction

endpackage

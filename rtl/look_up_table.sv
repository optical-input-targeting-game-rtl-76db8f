// look_up_table: 16-entry colour palette, 4-bit pixel index to 8-bit R, G and B.
//
// The sprites store indexed colour, not RGB, so every pixel the game emits passes
// through this table on its way to the VGA DAC. Indices 1-7 are the half-intensity
// (132) mixes of red, green and blue, 8 is light grey (198), 9-15 the full-intensity
// (255) mixes; 0 is black. Purely combinational: r, g and b follow pixel in the
// same cycle.
module look_up_table (
  input  logic [3:0] pixel,
  output logic [7:0] r,
  output logic [7:0] g,
  output logic [7:0] b
);
  logic [7:0] level;

  always_comb begin
    // bit 0 selects red, bit 1 green, bit 2 blue; bit 3 selects full intensity
    level = pixel[3] ? 8'd255 : 8'd132;
    r = pixel[0] ? level : 8'd0;
    g = pixel[1] ? level : 8'd0;
    b = pixel[2] ? level : 8'd0;
    if (pixel == 4'd8) begin
      r = 8'd198;
      g = 8'd198;
      b = 8'd198;
    end
  end
endmodule

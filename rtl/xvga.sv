// xvga: timing generator for a 1024x768 display at 60 Hz from a 65 MHz pixel clock.
//
// hcount runs 0..1343 along a line and vcount 0..805 down the frame; the visible
// area is hcount < 1024, vcount < 768. Standard XGA timing is used: horizontal
// front porch 24, sync 136, back porch 160 clocks; vertical front porch 3, sync 6,
// back porch 29 lines. hsync and vsync are active low, blank is high outside the
// visible area. All outputs are registered and mutually aligned.
module xvga #(
  parameter int H_DISPLAY = 1024,
  parameter int H_FP      = 24,
  parameter int H_SYNC    = 136,
  parameter int H_BP      = 160,
  parameter int V_DISPLAY = 768,
  parameter int V_FP      = 3,
  parameter int V_SYNC    = 6,
  parameter int V_BP      = 29
) (
  input  logic        vclock,
  input  logic        reset,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  localparam int H_TOTAL = H_DISPLAY + H_FP + H_SYNC + H_BP;
  localparam int V_TOTAL = V_DISPLAY + V_FP + V_SYNC + V_BP;

  logic        hreset, vreset;
  logic [10:0] hnext;
  logic [9:0]  vnext;

  always_comb begin
    hreset = (int'(hcount) == H_TOTAL - 1);
    vreset = (int'(vcount) == V_TOTAL - 1);
    hnext  = hreset ? 11'd0 : hcount + 1'b1;
    vnext  = !hreset ? vcount : (vreset ? 10'd0 : vcount + 1'b1);
  end

  always_ff @(posedge vclock) begin
    if (reset) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= hnext;
      vcount <= vnext;
      hsync  <= !((int'(hnext) >= H_DISPLAY + H_FP) && (int'(hnext) < H_DISPLAY + H_FP + H_SYNC));
      vsync  <= !((int'(vnext) >= V_DISPLAY + V_FP) && (int'(vnext) < V_DISPLAY + V_FP + V_SYNC));
      blank  <= (int'(hnext) >= H_DISPLAY) || (int'(vnext) >= V_DISPLAY);
    end
  end
endmodule

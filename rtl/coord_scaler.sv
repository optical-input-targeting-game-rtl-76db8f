// coord_scaler: maps a camera-image coordinate to the matching screen coordinate,
// so that the corners of the camera image land on the corners of the 1024x768
// display.
//
// Two look-up tables, one per axis, hold x_out = round(x * OUT_W / IN_W) and
// y_out = round(y * OUT_H / IN_H), clipped to the screen. They are filled at
// elaboration, which is equivalent to ROMs holding a straight-line fit. Inputs past
// the table end use the last entry. Timing: one clock (registered table outputs).
module coord_scaler #(
  parameter int IN_W  = 720,
  parameter int IN_H  = 460,
  parameter int OUT_W = 1024,
  parameter int OUT_H = 768
) (
  input  logic        clk,
  input  logic [10:0] x_in,
  input  logic [9:0]  y_in,
  output logic [10:0] x_out,
  output logic [9:0]  y_out
);
  logic [10:0] xlut [IN_W];
  logic [9:0]  ylut [IN_H];

  initial begin
    for (int i = 0; i < IN_W; i++) xlut[i] = 11'((i * OUT_W + IN_W / 2) / IN_W > OUT_W - 1 ? OUT_W - 1 : (i * OUT_W + IN_W / 2) / IN_W);
    for (int i = 0; i < IN_H; i++) ylut[i] = 10'((i * OUT_H + IN_H / 2) / IN_H > OUT_H - 1 ? OUT_H - 1 : (i * OUT_H + IN_H / 2) / IN_H);
  end

  localparam int XIW = $clog2(IN_W);
  localparam int YIW = $clog2(IN_H);

  always_ff @(posedge clk) begin
    x_out <= xlut[(int'(x_in) < IN_W) ? XIW'(x_in) : XIW'(IN_W - 1)];
    y_out <= ylut[(int'(y_in) < IN_H) ? YIW'(y_in) : YIW'(IN_H - 1)];
  end
endmodule

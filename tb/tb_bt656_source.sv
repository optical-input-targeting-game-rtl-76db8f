// tb_bt656_source: behavioural model of the ADV7185 video decoder's output, for
// testbenches only. It produces an interlaced ITU-R BT.656 stream (10-bit samples,
// one per clock) of a synthetic camera scene: two fields of V_BLANK blanking lines
// and ACTIVE_LINES active lines each; every line is EAV, H_BLANK blanking samples,
// SAV and ACTIVE_W pixels as Cb Y Cr Y. Frame row = 2*line + field.
// Scene: luminance 40 + ((x + 3*row) mod 64), with a 3x3 bright spot (Y = 235) whose
// top-left corner is (spot_x, spot_y); Cb = 128 + (x mod 16), Cr = 128 + (row mod 16)
// for the pixel pair starting at even x. Each active pixel sent is also pushed on
// the queue sent_q (with its field, row and column) for checking.
module tb_bt656_source #(
  parameter int ACTIVE_W     = 720,
  parameter int ACTIVE_LINES = 230,
  parameter int V_BLANK      = 20,
  parameter int H_BLANK      = 268
) (
  input  logic       clk,
  input  logic       run,
  input  int         spot_x,
  input  int         spot_y,
  output logic [9:0] sample,
  output int         frames_sent
);
  typedef struct {
    int f;
    int row;
    int x;
    logic [7:0] y;
    logic [7:0] cr;
    logic [7:0] cb;
  } px_t;
  px_t sent_q [$];

  function automatic logic [7:0] scene_y(int row, int x);
    if (x >= spot_x && x < spot_x + 3 && row >= spot_y && row < spot_y + 3) return 8'd235;
    return 8'(40 + ((x + 3 * row) % 64));
  endfunction

  function automatic logic [9:0] xyz(bit f, bit v, bit h);
    return {1'b1, f, v, h, v ^ h, f ^ h, f ^ v, f ^ v ^ h, 2'b00};
  endfunction

  task automatic send(logic [9:0] s);
    sample <= s;
    @(posedge clk);
  endtask

  task automatic line(bit f, bit v, int row);
    send(10'h3FF); send(10'h000); send(10'h000); send(xyz(f, v, 1'b1));
    for (int i = 0; i < H_BLANK; i++) send((i % 2) ? 10'h040 : 10'h200);
    send(10'h3FF); send(10'h000); send(10'h000); send(xyz(f, v, 1'b0));
    for (int x = 0; x < ACTIVE_W; x += 2) begin
      logic [7:0] cb, cr, y0, y1;
      if (v) begin
        cb = 8'h80; cr = 8'h80; y0 = 8'h10; y1 = 8'h10;
      end else begin
        cb = 8'(128 + (x % 16)); cr = 8'(128 + (row % 16));
        y0 = scene_y(row, x); y1 = scene_y(row, x + 1);
        sent_q.push_back('{f, row, x, y0, cr, cb});
        sent_q.push_back('{f, row, x + 1, y1, cr, cb});
      end
      send({cb, 2'b00}); send({y0, 2'b00}); send({cr, 2'b00}); send({y1, 2'b00});
    end
  endtask

  initial begin
    sample = 10'h200;
    frames_sent = 0;
    forever begin
      @(posedge clk);
      if (run) begin
        for (int f = 0; f < 2; f++) begin
          for (int l = 0; l < V_BLANK; l++) line(f[0], 1'b1, 0);
          for (int l = 0; l < ACTIVE_LINES; l++) line(f[0], 1'b0, 2 * l + f);
        end
        // close the last active line so that a paused stream reads as blanking
        send(10'h3FF); send(10'h000); send(10'h000); send(xyz(1'b1, 1'b1, 1'b1));
        sample <= 10'h200;
        frames_sent++;
      end
    end
  end
endmodule

// fb_reader: scans the camera image out of the frame buffer, one pixel per
// successful read, for the pixel analyzer.
//
// The scan starts at pixel (0,0), runs along each row to column IMG_W-1 and then
// down the rows to IMG_H-1 before starting again, so one full pass visits all
// IMG_W x IMG_H pixels (720 x 460 by default). Each pixel costs one read of the
// word that holds it (address {y, x[10:2]}); the caller extracts the byte.
//
// The reader has the lowest frame buffer priority. It always presents the address
// of its current pixel; read_success, from the arbiter in the same cycle, says
// whether the read was queued. Only then does the scan advance. A two-stage shift
// register carries the coordinates of each queued read alongside the RAM's
// two-cycle latency, so when a word comes back it leaves together with its
// coordinates and read_valid = 1. Lost cycles therefore become gaps (read_valid = 0)
// in the output stream rather than lost pixels. new_frame is high with the last
// pixel of a pass (IMG_W-1, IMG_H-1): the next valid pixel starts a new pass.
// Throughput: one pixel per cycle the frame buffer is free; with the display
// taking one cycle in four, a 720x460 pass takes about 441,600 clocks (about
// 147 passes per second at 65 MHz, about 139 with the camera writes).
// read_data is the frame buffer output passed on unchanged; read_x, read_y and
// read_valid say which pixel of it is meant.
module fb_reader
  import video_pkg::*;
#(
  parameter int IMG_W_P = IMG_W,
  parameter int IMG_H_P = IMG_H
) (
  input  logic          clock_65mhz,
  input  logic          reset,
  input  fb_word_t      zbt_data,
  input  logic          read_success,
  output fb_addr_t      read_address,
  output fb_word_t      read_data,
  output logic [XW-1:0] read_x,
  output logic [YW-1:0] read_y,
  output logic          read_valid,
  output logic          new_frame
);
  typedef struct packed {
    logic          valid;
    logic          last;
    logic [XW-1:0] x;
    logic [YW-1:0] y;
  } tag_t;

  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic          last_x, last_y;
  tag_t          p1, p2;

  always_comb begin
    last_x       = (int'(x) == IMG_W_P - 1);
    last_y       = (int'(y) == IMG_H_P - 1);
    read_address = fb_addr(x, y);
  end

  always_ff @(posedge clock_65mhz) begin
    if (reset) begin
      x  <= '0;
      y  <= '0;
      p1 <= '0;
      p2 <= '0;
    end else begin
      p1 <= '{valid: read_success, last: last_x && last_y, x: x, y: y};
      p2 <= p1;
      if (read_success) begin
        if (last_x) begin
          x <= '0;
          y <= last_y ? '0 : y + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end

  always_comb begin
    read_data  = zbt_data;
    read_x     = p2.x;
    read_y     = p2.y;
    read_valid = p2.valid;
    new_frame  = p2.valid && p2.last;
  end
endmodule

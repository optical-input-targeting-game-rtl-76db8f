// fb_arbiter: fixed-priority sharing of the single frame buffer port.
//
// Three clients use the frame buffer. The camera display path (fb_display) must
// read on time for the VGA raster and asks in exactly one of every four cycles; it
// always wins. The camera writer (fb_writer) comes second: if it asks in a display
// cycle it is told write_failed in that same cycle and repeats next cycle, which is
// always free. The frame buffer reader (fb_reader) is last: read_success is high
// only in cycles neither other client uses, and the reader simply waits otherwise.
// write_completed is registered and reports a write accepted in the previous cycle.
// The port signals are combinational from the requests.
// zbt_write_data is wr_data passed straight through, since only the writer writes.
module fb_arbiter
  import video_pkg::*;
(
  input  logic     clock_65mhz,
  input  logic     reset,
  // display reader, highest priority
  input  logic     disp_req,
  input  fb_addr_t disp_addr,
  // camera writer
  input  logic     wr_req,
  input  fb_addr_t wr_addr,
  input  fb_word_t wr_data,
  output logic     write_failed,
  output logic     write_completed,
  // frame buffer reader, lowest priority
  input  logic     rd_req,
  input  fb_addr_t rd_addr,
  output logic     read_success,
  // frame buffer port
  output logic     zbt_write_enable,
  output fb_addr_t zbt_address,
  output fb_word_t zbt_write_data
);
  always_comb begin
    write_failed     = wr_req && disp_req;
    read_success     = rd_req && !disp_req && !wr_req;
    zbt_write_enable = wr_req && !disp_req;
    zbt_write_data   = wr_data;
    if (disp_req)    zbt_address = disp_addr;
    else if (wr_req) zbt_address = wr_addr;
    else             zbt_address = rd_addr;
  end

  always_ff @(posedge clock_65mhz) begin
    if (reset) write_completed <= 1'b0;
    else       write_completed <= zbt_write_enable;
  end

  // at most one client owns the port in any cycle
  a_one_owner: assert property (@(posedge clock_65mhz) disable iff (reset)
    $onehot0({disp_req, zbt_write_enable, read_success}));
endmodule

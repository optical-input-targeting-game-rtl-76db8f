// frame_buffer: one NTSC frame of camera data in a 72-bit-wide pipelined SRAM.
//
// On the board this is two 512Kx36 zero-bus-turnaround (ZBT) SRAMs sharing one
// address bus and write enable; their data buses are concatenated (luminance RAM in
// bits 71:36, chrominance RAM in bits 35:0). Here they are modelled as one on-chip
// array with the same pipelined behaviour: address, write enable and write data are
// clocked in together, and the operation takes effect two cycles later. A read
// presented in cycle t returns its word on zbt_read_data in cycle t+2; a write
// presented in cycle t is visible to a read presented in cycle t+1 or later.
// zbt_enable low makes the RAM ignore that cycle (the design ties it high).
module frame_buffer
  import video_pkg::*;
#(
  parameter int AW = FB_AW
) (
  input  logic          clock_65mhz,
  input  logic          zbt_enable,
  input  logic          zbt_write_enable,
  input  logic [AW-1:0] zbt_address,
  input  fb_word_t      zbt_write_data,
  output fb_word_t      zbt_read_data
);
  fb_word_t      mem [2**AW];
  logic          s1_en, s1_we;
  logic [AW-1:0] s1_addr;
  fb_word_t      s1_data;

  always_ff @(posedge clock_65mhz) begin
    s1_en   <= zbt_enable;
    s1_we   <= zbt_write_enable;
    s1_addr <= zbt_address;
    s1_data <= zbt_write_data;
  end

  always_ff @(posedge clock_65mhz) begin
    if (s1_en) begin
      if (s1_we) mem[s1_addr] <= s1_data;
      else       zbt_read_data <= mem[s1_addr];
    end
  end
endmodule

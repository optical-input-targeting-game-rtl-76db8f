// tb_frame_buffer: random mix of reads and writes (address space reduced to 2^8
// words) against a reference memory. Every read must return, exactly two cycles
// later, the last value written by any earlier operation; zbt_enable low must make
// the RAM ignore the cycle.
module tb_frame_buffer;
  import video_pkg::*;
  localparam int AW = 8;
  logic clk = 0, en = 1, we = 0;
  logic [AW-1:0] addr = 0;
  fb_word_t wdata = 0, rdata;
  int checks = 0, failures = 0;
  fb_word_t model [2**AW];
  fb_word_t exp_q [3];
  bit       chk_q [3];

  always #5 clk = ~clk;

  frame_buffer #(.AW(AW)) dut (.clock_65mhz(clk), .zbt_enable(en), .zbt_write_enable(we),
    .zbt_address(addr), .zbt_write_data(wdata), .zbt_read_data(rdata));

  function automatic fb_word_t rnd72();
    return {8'($urandom), $urandom, $urandom};
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill the memory so every location is known
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      we = 1; en = 1; addr = AW'(a); wdata = rnd72(); model[a] = wdata;
    end
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (chk_q[1]) begin
        checks++;
        if (rdata !== exp_q[1]) begin
          failures++;
          if (failures < 10) $display("FAIL read: got %h exp %h", rdata, exp_q[1]);
        end
      end
      chk_q[1] = chk_q[0]; exp_q[1] = exp_q[0];
      en = ($urandom % 8) != 0;
      we = $urandom % 2;
      addr = AW'($urandom);
      wdata = rnd72();
      chk_q[0] = en && !we;
      exp_q[0] = model[addr];
      if (en && we) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fb_arbiter: random requests from the three clients. The display must always
// own the port when it asks, the writer otherwise (write_failed exactly when it
// collides with the display), and the reader only when both are idle. Address,
// data, write enable and the registered write_completed are checked every cycle.
module tb_fb_arbiter;
  import video_pkg::*;
  logic clk = 0, reset = 1;
  logic disp_req = 0, wr_req = 0, rd_req = 0;
  fb_addr_t disp_addr = 0, wr_addr = 0, rd_addr = 0, zbt_address;
  fb_word_t wr_data = 0, zbt_write_data;
  logic write_failed, write_completed, read_success, zbt_we;
  int checks = 0, failures = 0, n_fail = 0, n_read = 0;
  bit exp_completed = 0;

  always #5 clk = ~clk;

  fb_arbiter dut (.clock_65mhz(clk), .reset(reset), .disp_req(disp_req), .disp_addr(disp_addr),
    .wr_req(wr_req), .wr_addr(wr_addr), .wr_data(wr_data), .write_failed(write_failed),
    .write_completed(write_completed), .rd_req(rd_req), .rd_addr(rd_addr),
    .read_success(read_success), .zbt_write_enable(zbt_we), .zbt_address(zbt_address),
    .zbt_write_data(zbt_write_data));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    for (int i = 0; i < 10000; i++) begin
      @(negedge clk);
      checks++;
      if (write_completed !== exp_completed) begin failures++; $display("FAIL write_completed"); end
      disp_req = (i % 4) == 0;
      wr_req = $urandom % 2;
      rd_req = $urandom % 4 != 0;
      disp_addr = FB_AW'($urandom); wr_addr = FB_AW'($urandom); rd_addr = FB_AW'($urandom);
      wr_data = {8'($urandom), $urandom, $urandom};
      #1;
      checks++;
      if (write_failed !== (wr_req && disp_req) || read_success !== (rd_req && !disp_req && !wr_req) ||
          zbt_we !== (wr_req && !disp_req) || zbt_write_data !== wr_data ||
          zbt_address !== (disp_req ? disp_addr : wr_req ? wr_addr : rd_addr)) begin
        failures++;
        if (failures < 10) $display("FAIL grant at %0d: d%0b w%0b r%0b -> wf%0b rs%0b we%0b",
                                    i, disp_req, wr_req, rd_req, write_failed, read_success, zbt_we);
      end
      if (write_failed) n_fail++;
      if (read_success) n_read++;
      exp_completed = wr_req && !disp_req;
    end
    checks++;
    if (n_fail == 0 || n_read == 0) begin failures++; $display("FAIL no collision or no read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

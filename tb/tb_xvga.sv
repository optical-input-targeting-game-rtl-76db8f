// tb_xvga: runs two full 1024x768 frames and checks the counter ranges, the line
// length (1344 clocks), frame length (806 lines), and the exact positions of hsync
// (low for hcount 1048..1183), vsync (low for vcount 771..776) and blank.
module tb_xvga;
  logic clk = 0, reset = 1;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic hsync, vsync, blank;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  xvga dut (.vclock(clk), .reset(reset), .hcount(hcount), .vcount(vcount),
            .hsync(hsync), .vsync(vsync), .blank(blank));

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eh, ev, frames;
    repeat (2) @(negedge clk);
    reset = 0;
    @(negedge clk);
    // first cycle after reset: counters advanced from (0,0)
    eh = 1; ev = 0; frames = 0;
    while (frames < 2) begin
      checks++;
      if (hcount != 11'(eh) || vcount != 10'(ev) ||
          hsync != !(eh >= 1048 && eh < 1184) ||
          vsync != !(ev >= 771 && ev < 777) ||
          blank != (eh >= 1024 || ev >= 768)) begin
        failures++;
        if (failures < 10) $display("FAIL at h%0d v%0d: got h%0d v%0d hs%0b vs%0b bl%0b",
                                    eh, ev, hcount, vcount, hsync, vsync, blank);
      end
      eh++;
      if (eh == 1344) begin
        eh = 0; ev++;
        if (ev == 806) begin ev = 0; frames++; end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

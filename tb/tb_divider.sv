// tb_divider: with COUNT = 13 the enable must be a single-cycle pulse exactly
// every 13 clocks, the first one 13 clocks after reset is released.
module tb_divider;
  localparam int COUNT = 13;
  logic clk = 0, rst = 1, enbl;
  int checks = 0, failures = 0;
  int cyc = 0, last = 0, pulses = 0;

  always #5 clk = ~clk;

  divider #(.COUNT(COUNT)) dut (.clk(clk), .rst(rst), .enbl(enbl));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (cyc = 1; cyc <= 20 * COUNT; cyc++) begin
      @(negedge clk);
      checks++;
      if (enbl !== (cyc % COUNT == 0)) begin
        failures++;
        $display("FAIL cycle %0d enbl=%0b", cyc, enbl);
      end
      if (enbl) pulses++;
    end
    checks++;
    if (pulses != 20) begin failures++; $display("FAIL pulses %0d", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_debouncer: DELAY = 8. Short glitches and bounces must never reach the output;
// a level held steady must appear after the two synchroniser flops plus DELAY clocks.
module tb_debouncer;
  localparam int DELAY = 8;
  logic clk = 0, reset = 1, noisy = 0, clean;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  debouncer #(.DELAY(DELAY)) dut (.clk(clk), .reset(reset), .noisy(noisy), .clean(clean));

  task automatic expect_clean(logic v, string what);
    checks++;
    if (clean !== v) begin failures++; $display("FAIL %s: clean=%0b", what, clean); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    repeat (3) @(negedge clk);
    reset = 0;
    // bouncing press: pulses shorter than DELAY
    for (int i = 0; i < 6; i++) begin
      noisy = 1; repeat (3) @(negedge clk); expect_clean(0, "bounce high");
      noisy = 0; repeat (2) @(negedge clk); expect_clean(0, "bounce low");
    end
    // steady press
    noisy = 1;
    t = 0;
    while (clean == 0 && t < 50) begin @(negedge clk); t++; end
    checks++;
    if (t != DELAY + 2) begin failures++; $display("FAIL press seen after %0d clocks", t); end
    // glitch low while pressed
    noisy = 0; @(negedge clk); noisy = 1;
    repeat (20) begin @(negedge clk); expect_clean(1, "glitch while pressed"); end
    // release
    noisy = 0;
    t = 0;
    while (clean == 1 && t < 50) begin @(negedge clk); t++; end
    checks++;
    if (t != DELAY + 2) begin failures++; $display("FAIL release seen after %0d clocks", t); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

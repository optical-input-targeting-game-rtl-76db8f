// tb_coord_scaler: every camera column 0..719 and row 0..459 (plus out-of-range
// inputs) must map to round(x*1024/720) and round(y*768/460), one clock later;
// the image corners must land on the screen corners.
module tb_coord_scaler;
  logic clk = 0;
  logic [10:0] x_in = 0, x_out;
  logic [9:0]  y_in = 0, y_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  coord_scaler dut (.clk(clk), .x_in(x_in), .y_in(y_in), .x_out(x_out), .y_out(y_out));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex, ey, xi, yi;
    for (int i = 0; i < 760; i++) begin
      @(negedge clk);
      xi = i; yi = i % 480;
      x_in = 11'(xi); y_in = 10'(yi);
      @(negedge clk);
      if (xi > 719) xi = 719;
      if (yi > 459) yi = 459;
      ex = int'($floor(real'(xi) * 1024.0 / 720.0 + 0.5));
      ey = int'($floor(real'(yi) * 768.0 / 460.0 + 0.5));
      if (ex > 1023) ex = 1023;
      if (ey > 767) ey = 767;
      checks++;
      if (x_out != 11'(ex) || y_out != 10'(ey)) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d) -> (%0d,%0d) exp (%0d,%0d)", xi, yi, x_out, y_out, ex, ey);
      end
    end
    // corners
    @(negedge clk); x_in = 0; y_in = 0;
    @(negedge clk); checks++; if (x_out != 0 || y_out != 0) failures++;
    x_in = 719; y_in = 459;
    @(negedge clk); checks++; if (x_out < 1020 || y_out < 764) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

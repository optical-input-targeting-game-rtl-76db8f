// tb_look_up_table: checks all 16 palette entries against the colour table
// (black, the seven half-intensity mixes at 132, light grey 198, the seven
// full-intensity mixes at 255).
module tb_look_up_table;
  logic [3:0] pixel;
  logic [7:0] r, g, b;
  int checks = 0, failures = 0;

  look_up_table dut (.pixel(pixel), .r(r), .g(g), .b(b));

  // expected {r, g, b} per index
  logic [23:0] expected [16] = '{
    24'h000000, 24'h840000, 24'h008400, 24'h848400,
    24'h000084, 24'h840084, 24'h008484, 24'h848484,
    24'hC6C6C6, 24'hFF0000, 24'h00FF00, 24'hFFFF00,
    24'h0000FF, 24'hFF00FF, 24'h00FFFF, 24'hFFFFFF};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      pixel = 4'(i);
      #1;
      checks++;
      if ({r, g, b} !== expected[i]) begin
        failures++;
        $display("FAIL index %0d: got %h expected %h", i, {r, g, b}, expected[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sprite_rom: reads every location of the flying-duck ROM and the score ROM
// and compares with the artwork function, checking the one-clock read latency.
module tb_sprite_rom;
  import duck_hunt_pkg::*;
  logic clk = 0;
  logic [11:0] addr_d;
  logic [12:0] addr_s;
  logic [3:0]  dout_d, dout_s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sprite_rom #(.ART(ART_DUCK_LIVE), .AW(12)) duck_rom (.clk(clk), .addr(addr_d), .dout(dout_d));
  sprite_rom #(.ART(ART_SCORE), .AW(13)) score_rom (.clk(clk), .addr(addr_s), .dout(dout_s));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 5400; a++) begin
      @(negedge clk);
      addr_d = 12'(a % 2700);
      addr_s = 13'(a);
      @(negedge clk);
      checks += 2;
      if (dout_d !== art_pixel(ART_DUCK_LIVE, (a % 2700) / 900, ((a % 2700) % 900) / 30, (a % 2700) % 30)) begin
        failures++;
        $display("FAIL duck addr %0d got %0d", a % 2700, dout_d);
      end
      if (dout_s !== art_pixel(ART_SCORE, 0, a / 90, a % 90)) begin
        failures++;
        $display("FAIL score addr %0d got %0d", a, dout_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

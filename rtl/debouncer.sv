// debouncer: cleans up the fire push-button.
//
// The raw button is first passed through two flip-flops to bring it into the
// pixel-clock domain. clean follows the synchronised level only after it has
// stayed unchanged for DELAY consecutive clocks; any bounce restarts the count.
// The default of 650,000 clocks is 10 ms at 65 MHz. The design of this block
// (synchroniser, counter length, reset) is this implementation's own choice.
module debouncer #(
  parameter int unsigned DELAY = 650_000
) (
  input  logic clk,
  input  logic reset,
  input  logic noisy,
  output logic clean
);
  localparam int CW = $clog2(DELAY + 1);
  logic [1:0]    sync;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (reset) begin
      sync  <= '0;
      count <= '0;
      clean <= 1'b0;
    end else begin
      sync <= {sync[0], noisy};
      if (sync[1] == clean) begin
        count <= '0;
      end else if (count == CW'(DELAY - 1)) begin
        count <= '0;
        clean <= sync[1];
      end else begin
        count <= count + 1'b1;
      end
    end
  end
endmodule

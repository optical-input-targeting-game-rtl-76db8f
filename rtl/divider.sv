// divider: one-cycle enable pulse every COUNT clocks, used to pace the duck's
// wing flapping and tumbling.
//
// A counter advances each clock; when it reaches COUNT-1 it returns to zero and
// enbl is high for that one cycle. The default of 16,250,000 is a quarter of
// 65 million, so with the 65 MHz pixel clock the duck changes frame four times a
// second. Synchronous active-high reset clears the counter (the reset is this
// design's addition).
module divider #(
  parameter int unsigned COUNT = 16_250_000
) (
  input  logic clk,
  input  logic rst,
  output logic enbl
);
  localparam int CW = $clog2(COUNT + 1);
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      enbl  <= 1'b0;
    end else if (count == CW'(COUNT - 1)) begin
      count <= '0;
      enbl  <= 1'b1;
    end else begin
      count <= count + 1'b1;
      enbl  <= 1'b0;
    end
  end
endmodule

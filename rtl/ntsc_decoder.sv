// ntsc_decoder: turns the ADV7185 video decoder's ITU-R BT.656 byte stream into
// pixels with Y, Cr and Cb and the field / vertical / horizontal blanking flags.
//
// The decoder chip sends, at 27 MHz, one 10-bit sample per clock: the timing
// reference codes 3FF 000 000 XYZ (XYZ bit 8 = F, bit 7 = V, bit 6 = H) and, during
// active video, the repeating sequence Cb Y Cr Y, where each Cb/Cr pair is shared
// by the two Y samples around it. Only the upper 8 bits of each sample are kept.
// Every Y sample of an active line (V = 0, H = 0) produces one output pixel with
// data_valid high for one clock, carrying its own Y and the Cr/Cb of its pair;
// the first pixel of a pair is emitted when the pair's Cr arrives.
// fvh = {F, V, H} as last reported by a timing code. Timing: outputs registered.
// The ADV7185 register set-up over I2C that the chip needs at power-on is not part
// of this block.
module ntsc_decoder (
  input  logic       clk,          // 27 MHz decoder clock
  input  logic       reset,
  input  logic [9:0] tv_in_ycrcb,
  output logic [7:0] y,
  output logic [7:0] cr,
  output logic [7:0] cb,
  output logic [2:0] fvh,
  output logic       data_valid
);
  typedef enum logic [1:0] {S_CB, S_Y0, S_CR, S_Y1} phase_e;

  logic [9:0] d1, d2, d3;   // last three samples
  phase_e     phase;
  logic [7:0] cb_q, y0_q;
  logic       timing_code;

  // a timing code word follows 3FF 000 000
  assign timing_code = (d3 == 10'h3FF) && (d2 == 10'h000) && (d1 == 10'h000);

  always_ff @(posedge clk) begin
    if (reset) begin
      d1 <= '0; d2 <= '0; d3 <= '0;
      phase      <= S_CB;
      fvh        <= 3'b011;
      data_valid <= 1'b0;
      cb_q <= '0; y0_q <= '0;
      y <= '0; cr <= '0; cb <= '0;
    end else begin
      d1 <= tv_in_ycrcb;
      d2 <= d1;
      d3 <= d2;
      data_valid <= 1'b0;
      if (timing_code) begin
        fvh   <= tv_in_ycrcb[8:6];
        phase <= S_CB;
      end else if (tv_in_ycrcb == 10'h3FF || d1 == 10'h3FF || (d2 == 10'h3FF && d1 == 10'h000)) begin
        // inside a timing reference preamble: not video data
      end else if (fvh[1:0] == 2'b00) begin
        case (phase)
          S_CB: begin cb_q <= tv_in_ycrcb[9:2]; phase <= S_Y0; end
          S_Y0: begin y0_q <= tv_in_ycrcb[9:2]; phase <= S_CR; end
          S_CR: begin
            y <= y0_q; cr <= tv_in_ycrcb[9:2]; cb <= cb_q;
            data_valid <= 1'b1;
            phase <= S_Y1;
          end
          default: begin
            y <= tv_in_ycrcb[9:2];
            data_valid <= 1'b1;
            phase <= S_CB;
          end
        endcase
      end
    end
  end
endmodule

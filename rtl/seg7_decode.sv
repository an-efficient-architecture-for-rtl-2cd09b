// Hexadecimal seven-segment decoder for the out-of-range display.
//
// Each board's display shows the 4-bit value {OTR_A, 0, 0, OTR_B}, built
// from its two ADC out-of-range flags: 0 means both channels in range,
// 1 channel B over range, 8 channel A, 9 both. The decoder turns any
// 4-bit value into the usual hexadecimal digit shapes.
//
// The document names the decoder and what feeds it but not its table. The
// segment order (seg_n[0] = a ... seg_n[6] = g) and the active-low drive,
// matching the board's decimal points being held off with a 1, are this
// design's choices. Purely combinational.
module seg7_decode (
  input  logic [3:0] value,
  output logic [6:0] seg_n
);

  logic [6:0] seg;  // active high, bit 0 = segment a ... bit 6 = segment g

  always_comb begin
    unique case (value)
      4'h0: seg = 7'b0111111;
      4'h1: seg = 7'b0000110;
      4'h2: seg = 7'b1011011;
      4'h3: seg = 7'b1001111;
      4'h4: seg = 7'b1100110;
      4'h5: seg = 7'b1101101;
      4'h6: seg = 7'b1111101;
      4'h7: seg = 7'b0000111;
      4'h8: seg = 7'b1111111;
      4'h9: seg = 7'b1101111;
      4'hA: seg = 7'b1110111;
      4'hB: seg = 7'b1111100;
      4'hC: seg = 7'b0111001;
      4'hD: seg = 7'b1011110;
      4'hE: seg = 7'b1111001;
      4'hF: seg = 7'b1110001;
    endcase
    seg_n = ~seg;
  end

endmodule

// seven_seg_decoder: hex digit to seven-segment pattern for one DE2 display.
//
// The DE2 displays are common-anode: a segment lights when its line is low. Bit 0 is
// segment a (top), then clockwise b..f, and bit 6 is g (middle). `blank` turns every
// segment off, used for the unused HEX7/HEX6 digits. Purely combinational.
// The displays and their role come from the tutorial; the segment order and polarity
// follow the board's usual wiring and are this design's assumption.
module seven_seg_decoder (
  input  logic [3:0] value,
  input  logic       blank,
  output logic [6:0] seg_n     // active low, {g,f,e,d,c,b,a}
);
  logic [6:0] seg;   // active high

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
    seg_n = blank ? 7'h7F : ~seg;
  end

endmodule

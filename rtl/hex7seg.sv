// hex7seg: hexadecimal digit to seven-segment decoder.
//
// Purely combinational. The output drives one common-anode display digit of
// the kind found on the DE1-SoC board, so a segment is lit when its bit is 0.
// Bit order is {g, f, e, d, c, b, a}: bit 0 is the top segment, bits 1..5 go
// clockwise around the digit and bit 6 is the middle bar. Digits A..F are
// drawn as A, b, C, d, E, F. The active-low polarity and the bit order are
// this design's choice for that board.
module hex7seg (
  input  logic [3:0] digit,  // value to show
  output logic [6:0] seg_n   // active-low segments {g,f,e,d,c,b,a}
);

  logic [6:0] seg;  // active-high pattern

  always_comb begin
    unique case (digit)
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
  end

  assign seg_n = ~seg;

endmodule

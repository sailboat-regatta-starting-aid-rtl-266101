// BCD to seven-segment decoder with active-low outputs.
//
// The displays are common anode: their anodes are tied to the supply through
// a resistor and a segment lights when its cathode is driven low, so every
// segment output here is inverted. Digits 0-9 use the usual shapes (6 with
// its top bar, 9 with its bottom bar) and codes 10-15 show A, b, C, d, E, F,
// as the design's decoder does.
//
// Purely combinational. Port d is the 4-bit code, seg_n the pattern with
// bit 6 = segment a down to bit 0 = segment g (0 = lit).
module srsa_bcd7seg
  import srsa_pkg::*;
(
  input  bcd_t  d,
  output seg7_t seg_n
);

  seg7_t seg;  // active high:  abcdefg

  always_comb begin
    unique case (d)
      4'h0: seg = 7'b1111110;
      4'h1: seg = 7'b0110000;
      4'h2: seg = 7'b1101101;
      4'h3: seg = 7'b1111001;
      4'h4: seg = 7'b0110011;
      4'h5: seg = 7'b1011011;
      4'h6: seg = 7'b1011111;
      4'h7: seg = 7'b1110000;
      4'h8: seg = 7'b1111111;
      4'h9: seg = 7'b1111011;
      4'hA: seg = 7'b1110111;
      4'hB: seg = 7'b0011111;
      4'hC: seg = 7'b1001110;
      4'hD: seg = 7'b0111101;
      4'hE: seg = 7'b1001111;
      4'hF: seg = 7'b1000111;
    endcase
  end

  assign seg_n = ~seg;

endmodule

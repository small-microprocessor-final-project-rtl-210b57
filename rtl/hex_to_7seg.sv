// hex_to_7seg: hexadecimal digit to seven-segment code.
//
// The code is active low (a segment lights when its bit is 0), as the
// common-anode displays of the board need, with bit 0 = CA (top) through
// bit 6 = CG (middle). Letters b and d are shown in lower case.
// Combinational.
//
// The segment patterns are the usual hexadecimal ones; the active-low
// polarity matches the board's common-anode displays.
module hex_to_7seg (
  input  logic [3:0] hex,
  output logic [6:0] seg   // {CG, CF, CE, CD, CC, CB, CA}, active low
);
  always_comb begin
    unique case (hex)
      4'h0: seg = 7'b1000000;
      4'h1: seg = 7'b1111001;
      4'h2: seg = 7'b0100100;
      4'h3: seg = 7'b0110000;
      4'h4: seg = 7'b0011001;
      4'h5: seg = 7'b0010010;
      4'h6: seg = 7'b0000010;
      4'h7: seg = 7'b1111000;
      4'h8: seg = 7'b0000000;
      4'h9: seg = 7'b0010000;
      4'hA: seg = 7'b0001000;
      4'hB: seg = 7'b0000011;
      4'hC: seg = 7'b1000110;
      4'hD: seg = 7'b0100001;
      4'hE: seg = 7'b0000110;
      4'hF: seg = 7'b0001110;
    endcase
  end
endmodule

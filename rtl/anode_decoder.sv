// anode_decoder: 2-to-4 decoder with enable followed by inverters, driving
// the active-low anodes AN(3..0) of the four seven-segment digits.
//
// With en high, an[q] is 0 (digit q lit) and the rest are 1; with en low
// (display switched off) all four are 1. Combinational.
//
// Decoder, enable and inverters follow the original output module diagram.
module anode_decoder (
  input  logic [1:0] q,
  input  logic       en,
  output logic [3:0] an
);
  logic [3:0] dec;

  always_comb begin
    dec = '0;
    if (en) dec[q] = 1'b1;
    an = ~dec;
  end
endmodule

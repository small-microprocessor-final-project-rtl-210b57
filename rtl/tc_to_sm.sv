// tc_to_sm: two's complement to sign-and-magnitude converter for the display.
//
// sign is the top bit of the value; mag is its absolute value, WIDTH bits
// wide, so the most negative value -2^(WIDTH-1) (-800 hex) has magnitude 800
// hex and still fits. Combinational.
//
// The 12-bit magnitude follows the stated display range -800..7FF hex.
module tc_to_sm #(
  parameter int unsigned WIDTH = 12
) (
  input  logic [WIDTH-1:0] tc,
  output logic             sign,
  output logic [WIDTH-1:0] mag
);
  always_comb begin
    sign = tc[WIDTH-1];
    mag  = sign ? (~tc + WIDTH'(1)) : tc;
  end
endmodule

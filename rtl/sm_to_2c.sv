// sm_to_2c: sign-and-magnitude to two's complement converter for the data
// switches.
//
// The user enters a number in [-15, 15] on five switches: bit 4 (SW15) is the
// sign and bits 3..0 (SW14..SW11) the magnitude. The magnitude is zero
// extended to WIDTH bits and negated when the sign is set, so "negative zero"
// (10000) becomes 0. Purely combinational.
//
// The switch assignment follows the original design; mapping "negative
// zero" to 0 is a consequence of the conversion, not a stated rule.
module sm_to_2c #(
  parameter int unsigned WIDTH = 12
) (
  input  logic [4:0]       sm,   // {sign, magnitude[3:0]}
  output logic [WIDTH-1:0] tc    // two's complement value
);
  logic [WIDTH-1:0] mag;

  always_comb begin
    mag = WIDTH'(sm[3:0]);
    tc  = sm[4] ? (~mag + WIDTH'(1)) : mag;
  end
endmodule

// sign_to_7seg: the sign digit's converter.
//
// A negative sign lights only the middle segment CG; a positive sign leaves
// the digit dark. Active-low code, bit 0 = CA ... bit 6 = CG. Combinational.
//
// A minus drawn with segment G alone is this design's choice.
module sign_to_7seg
  import micro_pkg::*;
(
  input  logic       sign,
  output logic [6:0] seg
);
  always_comb seg = sign ? SEG_MINUS : SEG_BLANK;
endmodule

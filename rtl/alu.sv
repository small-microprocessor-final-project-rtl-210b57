// alu: the 12-bit arithmetic logic unit.
//
// Twelve units work in parallel on operand register A and the main data bus
// B, and a 12-to-1 mux picks one by sw: 0 A+1, 1 A-1, 2 -A, 3 A+B, 4 A-B,
// 5 |A-B|, 6 OR, 7 AND, 8 XOR, 9 NOR, 10 NAND, 11 XNOR. Arithmetic is two's
// complement and wraps modulo 2^WIDTH; |A-B| is the absolute value of the
// wrapped difference. Codes 12..15 give zero. Combinational; the result is
// captured by the answer register.
//
// The twelve functions and their mux order follow the original design;
// wrap-around on overflow and the zero output for codes 12..15 are this
// design's choices.
module alu
  import micro_pkg::*;
#(
  parameter int unsigned WIDTH = 12
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [3:0]       sw,
  output logic [WIDTH-1:0] y
);
  logic [WIDTH-1:0] diff;

  always_comb begin
    diff = a - b;
    unique case (sw)
      ALU_INC:  y = a + WIDTH'(1);
      ALU_DEC:  y = a - WIDTH'(1);
      ALU_NEG:  y = -a;
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = diff;
      ALU_ABS:  y = diff[WIDTH-1] ? -diff : diff;
      ALU_OR:   y = a | b;
      ALU_AND:  y = a & b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_NAND: y = ~(a & b);
      ALU_XNOR: y = ~(a ^ b);
      default:  y = '0;
    endcase
  end
endmodule

// op_to_sw: maps the 4-bit ALU op code to the ALU's mux select.
//
// The op code is the instruction's function field IR[7:4]. The arithmetic and
// logic functions occupy codes 0100..1111, in the same order as the ALU's
// mux inputs 0..11, so the select is op - 4. Codes 0000..0011 are not ALU
// operations and map to input 0. Combinational.
//
// The op - 4 mapping follows from the original function table and ALU mux
// order.
module op_to_sw (
  input  logic [3:0] op,
  output logic [3:0] sw
);
  always_comb begin
    if (op >= 4'd4) sw = op - 4'd4;
    else            sw = 4'd0;
  end
endmodule

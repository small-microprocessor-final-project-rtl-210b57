// en_reg: register with a load enable.
//
// On a rising clock edge with en high, q takes d; otherwise q holds. An
// active-low asynchronous reset loads RESET_VAL. Every storage element of the
// microprocessor is one of these: the input register, R0..R3, operand
// register A, the answer register ANS, the output register, the instruction
// register IR, the display on/off register and the 2-bit display register.
//
// The register and its enable follow the design's block diagram; the
// asynchronous reset to zero is this design's choice.
module en_reg #(
  parameter int unsigned     WIDTH     = 12,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= RESET_VAL;
    else if (en) q <= d;
  end
endmodule

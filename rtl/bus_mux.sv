// bus_mux: the 6-to-1 multiplexer that drives the main data bus.
//
// Input 0 is the input register, inputs 1..4 are storage registers R0..R3
// and input 5 is the answer register ANS. The select (SW_MUX) is three bits;
// the unused codes 6 and 7 drive zero. Combinational.
//
// The six inputs, Input on 0 and ANS on 5 follow the original design; the
// placement of R0..R3 on inputs 1..4 in that order is this design's choice.
module bus_mux #(
  parameter int unsigned WIDTH = 12
) (
  input  logic [2:0]             sel,
  input  logic [WIDTH-1:0]       in_reg,
  input  logic [3:0][WIDTH-1:0]  r,      // r[n] = Rn
  input  logic [WIDTH-1:0]       ans,
  output logic [WIDTH-1:0]       bus
);
  always_comb begin
    unique case (sel)
      3'd0:    bus = in_reg;
      3'd1:    bus = r[0];
      3'd2:    bus = r[1];
      3'd3:    bus = r[2];
      3'd4:    bus = r[3];
      3'd5:    bus = ans;
      default: bus = '0;
    endcase
  end
endmodule

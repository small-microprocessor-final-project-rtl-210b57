// storage_reg_decoder: 2-to-4 decoder with enable that gives the load
// enables of storage registers R0..R3.
//
// When e_dec is high, e_r[sel] is high and the others low; when e_dec is low
// all four are low. Combinational.
//
// The signal names follow the original control circuit diagram; the
// decoder's insides are this design's own.
module storage_reg_decoder (
  input  logic       e_dec,
  input  logic [1:0] sel,
  output logic [3:0] e_r
);
  always_comb begin
    e_r = '0;
    if (e_dec) e_r[sel] = 1'b1;
  end
endmodule

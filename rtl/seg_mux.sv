// seg_mux: 4-to-1 multiplexer of seven-segment codes.
//
// Passes d[q], the code of the digit whose anode is lit, to the segment
// lines CA..CG. Combinational.
//
// The digit-to-select mapping (select 3 = sign digit) is this design's
// choice, matching the anode decoder.
module seg_mux (
  input  logic [1:0]      q,
  input  logic [3:0][6:0] d,
  output logic [6:0]      y
);
  always_comb y = d[q];
endmodule

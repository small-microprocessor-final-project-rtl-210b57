// mod_counter: modulo-N counter with a terminal-count output.
//
// While en is high the count advances by one each clock and wraps from N-1 to
// 0; tc is high while the count is N-1 and en is high, so it pulses once
// every N enabled clocks. The output module uses one with N = 500000 as the
// refresh divider (a 200 Hz tick Z from the 100 MHz clock) and one with
// N = 4, advanced by Z, to pick the digit. Active-low asynchronous reset.
//
// The two moduli follow the original design; the counter's insides are this
// design's own.
module mod_counter #(
  parameter int unsigned N  = 500000,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [CW-1:0] q,
  output logic          tc
);
  localparam logic [CW-1:0] LAST = CW'(N - 1);

  always_comb tc = en && (q == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= (q == LAST) ? '0 : q + CW'(1);
  end
endmodule

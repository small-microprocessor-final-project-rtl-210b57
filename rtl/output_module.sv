// output_module: shows a 12-bit two's complement value on four multiplexed
// seven-segment digits as a sign and three hexadecimal digits.
//
// The output register captures the main data bus when e_out is high. Its
// value is split into sign and magnitude; the sign digit (AN3, leftmost)
// shows a minus or nothing, and the magnitude's three nibbles go to AN2, AN1
// and AN0. The digits share the segment lines: a modulo-REFRESH_DIV counter
// gives a tick Z (200 Hz from 100 MHz at the default 500000), Z advances a
// modulo-4 counter, and the count, held one clock in the 2-bit display
// register, selects both the segment code and, through a 2-to-4 decoder and
// inverters, the one anode driven low. Each digit is lit for REFRESH_DIV
// clocks in turn. disp_on low turns all anodes off.
//
// Timing: a value loaded at a clock edge reaches the segment lines at once
// through combinational logic; the digit index is one clock behind the
// modulo-4 counter because of the display register.
//
// The chain of blocks follows the original output module diagram; the
// digit order (sign on AN3, most significant nibble on AN2) follows its
// board labels, and the one-clock tick Z is this design's choice.
module output_module
  import micro_pkg::*;
#(
  parameter int unsigned REFRESH_DIV = 500000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       e_out,
  input  word_t      bus,
  input  logic       disp_on,
  output logic [6:0] seg,   // CA..CG, active low, seg[0] = CA
  output logic [3:0] an     // AN(3..0), active low
);
  localparam int unsigned ZW = (REFRESH_DIV > 1) ? $clog2(REFRESH_DIV) : 1;

  word_t           out_q;
  logic            sign;
  word_t           mag;
  logic [3:0][6:0] codes;
  logic [ZW-1:0]   z_cnt;
  logic            z;
  logic [1:0]      q0, q;
  logic            q_tc;

  en_reg #(.WIDTH(DW)) u_out_reg (
    .clk, .rst_n, .en(e_out), .d(bus), .q(out_q)
  );

  tc_to_sm #(.WIDTH(DW)) u_tc_to_sm (.tc(out_q), .sign, .mag);

  sign_to_7seg u_sign_seg (.sign, .seg(codes[3]));
  hex_to_7seg  u_hex2 (.hex(mag[11:8]), .seg(codes[2]));
  hex_to_7seg  u_hex1 (.hex(mag[7:4]),  .seg(codes[1]));
  hex_to_7seg  u_hex0 (.hex(mag[3:0]),  .seg(codes[0]));

  seg_mux u_seg_mux (.q, .d(codes), .y(seg));

  mod_counter #(.N(REFRESH_DIV)) u_refresh (
    .clk, .rst_n, .en(1'b1), .q(z_cnt), .tc(z)
  );

  mod_counter #(.N(4)) u_digit (
    .clk, .rst_n, .en(z), .q(q0), .tc(q_tc)
  );

  en_reg #(.WIDTH(2)) u_disp_reg (
    .clk, .rst_n, .en(1'b1), .d(q0), .q(q)
  );

  anode_decoder u_an_dec (.q, .en(disp_on), .an);

  // z_cnt and q_tc are not used outside their counters.
  logic unused;
  always_comb unused = ^{z_cnt, q_tc};
endmodule

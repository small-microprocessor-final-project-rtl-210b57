// small_microprocessor: a 12-bit accumulator-style teaching processor run
// from switches and shown on four seven-segment digits.
//
// The user sets a signed number in [-15, 15] on five switches and an 8-bit
// instruction on eight more, then raises w. The controller loads the
// instruction and sequences the datapath over a single 12-bit bus driven by
// a 6-to-1 multiplexer (input register, R0..R3, answer register). ALU
// instructions take their first operand from the bus into register A, their
// second operand from the bus directly, put the result in ANS, and move ANS
// back over the bus into the destination register. done lights when the
// instruction has finished and stays lit until w is lowered. The "show"
// instruction copies a register to the output module, which displays it as
// a sign and three hex digits.
//
// Ports: clk (100 MHz), resetn (active low, asynchronous), sw_in = {SW15 sign,
// SW14..SW11 magnitude}, w, ir (instruction), done, seg (CA..CG, active low,
// seg[0] = CA), an (AN3..AN0, active low, AN3 = sign digit).
//
// The control word's E_IR, E_DISP, disp, SEL, E_DEC and done fields are used
// inside the control circuit, so the top leaves them unconnected here.
//
// The datapath and its connections follow the original block diagram; the
// order of R0..R3 on the bus mux and the reset of all registers are this
// design's choices.
module small_microprocessor
  import micro_pkg::*;
#(
  parameter int unsigned REFRESH_DIV = 500000
) (
  input  logic       clk,
  input  logic       resetn,
  input  logic [4:0] sw_in,
  input  logic       w,
  input  logic [7:0] ir,
  output logic       done,
  output logic [6:0] seg,
  output logic [3:0] an
);
  ctrl_t            ctrl;
  logic [3:0]       e_r;
  logic             disp_onoff;
  word_t            in_tc, in_q, a_q, ans_q, alu_y, bus;
  word_t [3:0]      r_q;
  logic [3:0]       alu_sw;

  control_circuit u_ctrl (
    .clk, .rst_n(resetn), .w, .ir_sw(ir), .ctrl, .e_r, .disp_onoff, .done
  );

  sm_to_2c #(.WIDTH(DW)) u_sm_to_2c (.sm(sw_in), .tc(in_tc));

  en_reg #(.WIDTH(DW)) u_in_reg (
    .clk, .rst_n(resetn), .en(ctrl.e_in), .d(in_tc), .q(in_q)
  );

  for (genvar i = 0; i < 4; i++) begin : g_r
    en_reg #(.WIDTH(DW)) u_r (
      .clk, .rst_n(resetn), .en(e_r[i]), .d(bus), .q(r_q[i])
    );
  end

  bus_mux #(.WIDTH(DW)) u_bus_mux (
    .sel(ctrl.sw_mux), .in_reg(in_q), .r(r_q), .ans(ans_q), .bus
  );

  en_reg #(.WIDTH(DW)) u_a_reg (
    .clk, .rst_n(resetn), .en(ctrl.e_a), .d(bus), .q(a_q)
  );

  op_to_sw u_op_to_sw (.op(ctrl.op), .sw(alu_sw));

  alu #(.WIDTH(DW)) u_alu (.a(a_q), .b(bus), .sw(alu_sw), .y(alu_y));

  en_reg #(.WIDTH(DW)) u_ans_reg (
    .clk, .rst_n(resetn), .en(ctrl.e_ans), .d(alu_y), .q(ans_q)
  );

  output_module #(.REFRESH_DIV(REFRESH_DIV)) u_out (
    .clk, .rst_n(resetn), .e_out(ctrl.e_out), .bus, .disp_on(disp_onoff),
    .seg, .an
  );
endmodule

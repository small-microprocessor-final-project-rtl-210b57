// control_circuit: the microprocessor's controller.
//
// The w switch is first captured in a 1-bit register, so the FSM sees it one
// clock late and only as a clean level. On acceptance the 8-bit instruction
// register IR captures the instruction switches (E_IR); the FSM then runs the
// instruction from IR, so the switches may change while it executes. A 1-bit
// register holds the display on/off bit (loaded from IR[0] by the "0010"
// instruction; reset to on). The storage register decoder turns E_DEC and
// Ra into the load enables of R0..R3. done is high from the end of an
// instruction until w is released.
//
// The IR register, display on/off register and storage decoder follow the
// original control circuit; the w register follows its authors' fix for w
// acting outside the first state. The display starting on after reset is
// this design's choice.
module control_circuit
  import micro_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       w,
  input  logic [7:0] ir_sw,       // instruction switches
  output ctrl_t      ctrl,        // controls for the datapath
  output logic [3:0] e_r,         // E_R0..E_R3
  output logic       disp_onoff,  // display enable
  output logic       done
);
  logic       w_q;
  logic [7:0] ir_q;

  en_reg #(.WIDTH(1)) u_w_reg (
    .clk, .rst_n, .en(1'b1), .d(w), .q(w_q)
  );

  en_reg #(.WIDTH(8)) u_ir (
    .clk, .rst_n, .en(ctrl.e_ir), .d(ir_sw), .q(ir_q)
  );

  control_fsm u_fsm (.clk, .rst_n, .w(w_q), .ir(ir_q), .ctrl);

  en_reg #(.WIDTH(1), .RESET_VAL(1'b1)) u_e_disp (
    .clk, .rst_n, .en(ctrl.e_disp), .d(ctrl.disp), .q(disp_onoff)
  );

  storage_reg_decoder u_dec (.e_dec(ctrl.e_dec), .sel(ctrl.sel), .e_r);

  always_comb done = ctrl.done;
endmodule

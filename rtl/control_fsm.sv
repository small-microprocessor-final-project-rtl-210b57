// control_fsm: the finite state machine that sequences every instruction.
//
// Idle in S1 until w is high; then the instruction register is loaded (E_IR)
// and S2 decodes f = IR[7:4]. Each function then runs a short fixed
// sequence, one state per clock, and all end in S19, which raises done and
// waits for w to go low before returning to S1:
//   0000 store   S3  load input register (E_IN)
//                S3a bus = input, load Ra
//   0001 show    S4  bus = Ra, load output register (E_OUT)
//   0010 on/off  S5  display register = IR[0] (E_DISP)
//   0011 copy    S6  bus = Rb, load Ra
//   0100-0110    S7-9   bus = Ra, load A
//   (unary ALU)  S7a-9a op = f, load ANS
//                S7b-9b bus = ANS, load Ra
//   0111-1111    S10-18   bus = Ra, load A
//   (binary ALU) S10a-18a bus = Rb, op = f, load ANS
//                S10b-18b bus = ANS, load Ra
// A two-operand ALU instruction thus spends four clocks between S1 and S19
// (S2, S10, S10a, S10b). The states S7..S9 and S10..S18 differ only in the
// op code, which is taken from IR, so each group is one state here.
// Outputs are Moore outputs of the state, except E_IR, which is high in S1
// while w is high. Active-low asynchronous reset to S1.
//
// The states, their outputs and the four-clock add follow the original ASM
// chart; merging S7..S9 and S10..S18 into one state per group is this
// design's choice and does not change behaviour.
module control_fsm
  import micro_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       w,      // registered w
  input  logic [7:0] ir,     // instruction register output
  output ctrl_t      ctrl
);
  typedef enum logic [3:0] {
    S1, S2, S3, S3A, S4, S5, S6,
    S_UN, S_UN_A, S_UN_B,       // S7..S9, S7a..S9a, S7b..S9b
    S_BIN, S_BIN_A, S_BIN_B,    // S10..S18, S10a..S18a, S10b..S18b
    S19
  } state_t;

  state_t state, state_n;
  func_t  f;
  logic [1:0] ra, rb;

  always_comb begin
    f  = func_t'(ir[7:4]);
    ra = ir[3:2];
    rb = ir[1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S1;
    else        state <= state_n;
  end

  always_comb begin
    state_n = state;
    unique case (state)
      S1:      if (w) state_n = S2;
      S2: begin
        unique case (f)
          F_STORE:             state_n = S3;
          F_SHOW:              state_n = S4;
          F_DISP:              state_n = S5;
          F_COPY:              state_n = S6;
          F_INC, F_DEC, F_NEG: state_n = S_UN;
          default:             state_n = S_BIN;
        endcase
      end
      S3:      state_n = S3A;
      S_UN:    state_n = S_UN_A;
      S_UN_A:  state_n = S_UN_B;
      S_BIN:   state_n = S_BIN_A;
      S_BIN_A: state_n = S_BIN_B;
      S3A, S4, S5, S6, S_UN_B, S_BIN_B: state_n = S19;
      S19:     if (!w) state_n = S1;
      default: state_n = S1;
    endcase
  end

  always_comb begin
    ctrl        = '0;
    ctrl.sel    = ra;
    ctrl.disp   = ir[0];
    unique case (state)
      S1:      ctrl.e_ir = w;
      S3:      ctrl.e_in = 1'b1;
      S3A: begin
        ctrl.sw_mux = MUX_INPUT;
        ctrl.e_dec  = 1'b1;
      end
      S4: begin
        ctrl.sw_mux = reg_to_mux(ra);
        ctrl.e_out  = 1'b1;
      end
      S5:      ctrl.e_disp = 1'b1;
      S6: begin
        ctrl.sw_mux = reg_to_mux(rb);
        ctrl.e_dec  = 1'b1;
      end
      S_UN, S_BIN: begin
        ctrl.sw_mux = reg_to_mux(ra);
        ctrl.e_a    = 1'b1;
      end
      S_UN_A: begin
        ctrl.op     = ir[7:4];
        ctrl.e_ans  = 1'b1;
      end
      S_BIN_A: begin
        ctrl.sw_mux = reg_to_mux(rb);
        ctrl.op     = ir[7:4];
        ctrl.e_ans  = 1'b1;
      end
      S_UN_B, S_BIN_B: begin
        ctrl.sw_mux = MUX_ANS;
        ctrl.e_dec  = 1'b1;
      end
      S19:     ctrl.done = 1'b1;
      default: ;
    endcase
  end

  // At most one register is loaded per clock (S1, the reset state, loads
  // none of these, so the rule holds during reset too).
  a_one_writer: assert property (@(posedge clk)
    $onehot0({ctrl.e_in, ctrl.e_out, ctrl.e_a, ctrl.e_ans, ctrl.e_dec, ctrl.e_disp}));
endmodule

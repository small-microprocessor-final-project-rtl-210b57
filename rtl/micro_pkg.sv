// micro_pkg: types and constants shared by the small microprocessor.
//
// The datapath is 12 bits wide. The instruction is 8 bits: IR[7:4] is the
// function code f, IR[3:2] is register Ra and IR[1:0] is register Rb (IR[0]
// doubles as the display on/off bit D). The bus multiplexer numbers its
// inputs Input = 0, storage registers 1..4 and ANS = 5. The controller's
// outputs travel as one packed struct, ctrl_t.
package micro_pkg;

  localparam int unsigned DW = 12;   // width of the main data bus

  typedef logic [DW-1:0] word_t;

  // Function codes, IR[7:4].
  typedef enum logic [3:0] {
    F_STORE = 4'b0000,  // Ra = input
    F_SHOW  = 4'b0001,  // show Ra on the display
    F_DISP  = 4'b0010,  // display on/off, D = IR[0]
    F_COPY  = 4'b0011,  // Ra = Rb
    F_INC   = 4'b0100,  // Ra = Ra + 1
    F_DEC   = 4'b0101,  // Ra = Ra - 1
    F_NEG   = 4'b0110,  // Ra = -Ra
    F_ADD   = 4'b0111,  // Ra = Ra + Rb
    F_SUB   = 4'b1000,  // Ra = Ra - Rb
    F_ABS   = 4'b1001,  // Ra = |Ra - Rb|
    F_OR    = 4'b1010,
    F_AND   = 4'b1011,
    F_XOR   = 4'b1100,
    F_NOR   = 4'b1101,
    F_NAND  = 4'b1110,
    F_XNOR  = 4'b1111
  } func_t;

  // ALU multiplexer inputs, in the order of the ALU's 12-to-1 mux.
  typedef enum logic [3:0] {
    ALU_INC = 4'd0, ALU_DEC = 4'd1, ALU_NEG = 4'd2, ALU_ADD = 4'd3,
    ALU_SUB = 4'd4, ALU_ABS = 4'd5, ALU_OR  = 4'd6, ALU_AND = 4'd7,
    ALU_XOR = 4'd8, ALU_NOR = 4'd9, ALU_NAND = 4'd10, ALU_XNOR = 4'd11
  } alu_sw_t;

  // Bus multiplexer select (SW_MUX).
  localparam logic [2:0] MUX_INPUT = 3'd0;
  localparam logic [2:0] MUX_ANS   = 3'd5;

  // Storage register Rn sits on bus multiplexer input n + 1.
  function automatic logic [2:0] reg_to_mux(input logic [1:0] r);
    return {1'b0, r} + 3'd1;
  endfunction

  // Control word produced by the FSM.
  typedef struct packed {
    logic       e_ir;    // load instruction register
    logic       e_in;    // load input register
    logic       e_out;   // load output register
    logic       e_a;     // load operand register A
    logic       e_ans;   // load answer register
    logic       e_dec;   // enable storage register decoder
    logic       e_disp;  // load display on/off register
    logic       disp;    // value for the display on/off register
    logic [1:0] sel;     // storage register to load (Ra)
    logic [2:0] sw_mux;  // bus multiplexer select
    logic [3:0] op;      // ALU op code
    logic       done;    // instruction finished
  } ctrl_t;

  // Active-low segment codes, bit 0 = CA ... bit 6 = CG.
  localparam logic [6:0] SEG_BLANK = 7'b1111111;
  localparam logic [6:0] SEG_MINUS = 7'b0111111;

endpackage

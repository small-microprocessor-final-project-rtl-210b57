# Small microprocessor: a 12-bit switch-programmed datapath

This is a small teaching processor for an FPGA trainer board with switches, LEDs and four
seven-segment digits. It has no program memory. The user is the program counter: they set an
8-bit instruction and a small signed number on switches, then raise a switch named `w`. The
controller runs that one instruction over a single shared 12-bit bus, lights `done`, and waits
for `w` to come down again. Results stay in four storage registers, R0 to R3, and a "show"
instruction puts any of them on the display as a sign and three hexadecimal digits.

The main idea is a one-bus datapath: only one value can be on the bus in a clock. An operation
with two operands therefore takes several clocks. The first operand is parked in register A, the
second is read straight off the bus, the result goes into an answer register (ANS), and then
ANS is driven back over the bus into the destination register. A finite state machine (FSM)
sequences those moves.

## Instruction set

The instruction is `IR[7:4] = f` (function), `IR[3:2] = Ra`, `IR[1:0] = Rb`. "X" fields are
ignored.

| f    | operation                         | f    | operation           |
|------|-----------------------------------|------|---------------------|
| 0000 | Ra = input number                 | 1000 | Ra = Ra - Rb        |
| 0001 | show Ra on the display            | 1001 | Ra = \|Ra - Rb\|    |
| 0010 | display on (IR[0]=1) / off (0)    | 1010 | Ra = Ra OR Rb       |
| 0011 | Ra = Rb                           | 1011 | Ra = Ra AND Rb      |
| 0100 | Ra = Ra + 1                       | 1100 | Ra = Ra XOR Rb      |
| 0101 | Ra = Ra - 1                       | 1101 | Ra = Ra NOR Rb      |
| 0110 | Ra = -Ra                          | 1110 | Ra = Ra NAND Rb     |
| 0111 | Ra = Ra + Rb                      | 1111 | Ra = Ra XNOR Rb     |

The input number comes from five switches: a sign switch (SW15) and a 4-bit magnitude
(SW14 to SW11). It is converted to a 12-bit two's complement value, so it covers -15 to +15. All
arithmetic is 12-bit two's complement and wraps on overflow. `|Ra - Rb|` is the absolute value
of the wrapped 12-bit difference. Example: with R0 = 5 and R1 = -4, instruction `1001_01_00`
leaves R1 = 9.

## How an instruction executes

This is the part that needs the most care. Everything runs on one 100 MHz clock.

1. **w register.** The `w` switch is first captured in a flip-flop. The FSM only sees this
   registered copy, one clock late. It acts only in the idle state S1 and in the final state
   S19.
2. **S1 (idle).** When the registered `w` is high, the FSM asserts `E_IR` and the instruction
   register captures the instruction switches. After that the switches may change freely.
3. **S2 (decode).** Branches on f.
4. **Execution states.** Each lasts exactly one clock:

   | f         | states           | what each state does                                          |
   |-----------|------------------|---------------------------------------------------------------|
   | 0000      | S3, S3a          | load input register; bus = input, write Ra                    |
   | 0001      | S4               | bus = Ra, load output register                                |
   | 0010      | S5               | display on/off register = IR[0]                               |
   | 0011      | S6               | bus = Rb, write Ra                                            |
   | 0100-0110 | S7-9, a, b       | bus = Ra, load A; op = f, load ANS; bus = ANS, write Ra       |
   | 0111-1111 | S10-18, a, b     | bus = Ra, load A; bus = Rb, op = f, load ANS; bus = ANS, write Ra |

5. **S19 (done).** `done` is high. The FSM stays here while the registered `w` is high, then
   returns to S1. One press of `w` therefore runs exactly one instruction.

A two-operand ALU instruction spends four clocks between S1 and S19 (S2, S10, S10a, S10b). The
destination register is written at the end of the fourth. Counted from the clock edge on which
`w` is first high, `done` rises after:

| instruction kind               | clocks to `done` |
|--------------------------------|------------------|
| store (0000)                   | 5                |
| show, display on/off, copy     | 4                |
| any ALU instruction            | 6                |

The ALU's op code is `f` itself. The ALU's internal 12-to-1 mux is ordered like codes 0100 to
1111, so "OP to SW" just subtracts 4. The storage-register decoder turns `E_DEC` and Ra into one
of the enables `E_R0` to `E_R3`. An assertion in the FSM checks that at most one of the datapath
loads (input, output, A, ANS, storage, display) is active in any clock.

## Datapath

- **Bus multiplexer (6 to 1, 3-bit select).** Input register = 0, R0 to R3 = 1 to 4, ANS = 5.
  Codes 6 and 7 drive zero.
- **Registers.** Input register, R0 to R3, A, ANS, output register, IR and display on/off are all
  instances of one enabled D register (`en_reg`). The asynchronous reset is active low and clears
  them all. The display on/off register resets to "on".
- **ALU.** Operand A is the A register and operand B is the bus. It holds twelve parallel
  function units and a 12-to-1 mux.

## Display

The output register holds the last shown value. It is split into a sign and a 12-bit magnitude.
The magnitude is 12 bits wide so that -2048 displays as `-800`. The leftmost digit (AN3) shows a
minus or stays dark. AN2, AN1 and AN0 show the magnitude in hex, most significant first.

The four digits share the segment lines and are lit one at a time:

- A modulo-500000 counter makes a one-clock tick every 5 ms.
- The tick advances a modulo-4 counter.
- The count passes through a 2-bit display register. It then drives both the 4-to-1 segment
  mux and a 2-to-4 decoder with inverters.
- The decoder drives the active-low anodes.

Each digit is lit for 500000 clocks in the order AN0, AN1, AN2, AN3, so the whole display
refreshes at 50 Hz. The decoder's enable is the display on/off register: off darkens all four
anodes. Segment codes are active low, `seg[0]` = CA (top) through `seg[6]` = CG (middle).

## Top-level ports (`small_microprocessor`)

| port       | dir | width | meaning                                      |
|------------|-----|-------|----------------------------------------------|
| clk        | in  | 1     | 100 MHz clock                                |
| resetn     | in  | 1     | asynchronous reset, active low               |
| sw_in      | in  | 5     | {sign, magnitude[3:0]} of the input number   |
| w          | in  | 1     | accept the instruction                       |
| ir         | in  | 8     | instruction switches                         |
| done       | out | 1     | instruction finished (LED)                   |
| seg        | out | 7     | segments CA..CG, active low                  |
| an         | out | 4     | anodes AN3..AN0, active low                  |

Parameter `REFRESH_DIV` (default 500000) is the clocks per lit digit. Lower it for simulation.

## Where this design makes its own choices

The function set, the state sequence, the bus structure and the display chain follow the
original design. These points were not specified there and are choices made here:

- R0 to R3 sit on bus-mux inputs 1 to 4, in that order. The original says only that the
  select for a register comes from a lookup.
- Arithmetic wraps on overflow. The absolute difference is taken of the wrapped difference.
- Reset clears every register, and the display starts on.
- The FSM groups S7 to S9 and S10 to S18 into one state per group and reads the op code from IR.
  The behaviour is the same as separate states.
- Segment bit order and polarity, the shape of the minus sign, the digit order on the anodes,
  and a one-clock refresh tick.
- The synchronizing register on `w` and the display register on the digit counter are part of
  the original design's final version. The `w` register adds one clock of latency, which the
  timing table above includes.

The design has no memory for data or programs.

## Files

`rtl/` holds one module or package per file:

- `micro_pkg`: widths, function codes, ALU selects and the control-word struct.
- `small_microprocessor`: the top.
- `control_circuit`, `control_fsm`, `storage_reg_decoder`: the controller.
- `sm_to_2c`, `en_reg`, `bus_mux`, `op_to_sw`, `alu`: the datapath.
- `output_module`, `tc_to_sm`, `hex_to_7seg`, `sign_to_7seg`, `seg_mux`, `mod_counter`,
  `anode_decoder`: the display.

`tb/` has a self-checking testbench `tb_<module>` for each module. `seg_ref_pkg` holds the
reference segment codes the testbenches decode with.

- `tb_small_microprocessor` runs the processor end to end with `REFRESH_DIV = 4`. It compares
  with a reference model about 400 random instructions plus directed ones (the worked example,
  display off, wrap-around, a reset mid-run). It checks every instruction's latency and counts
  that each function and each mechanism occurred.
- `tb_small_microprocessor_full` runs at the default parameters. It stores +5 and -4, computes
  the absolute difference and reads each value back from the full-speed display scan (about
  10 seconds to run).

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/micro_pkg.sv tb/seg_ref_pkg.sv tb/tb_small_microprocessor.sv \
  --top-module tb_small_microprocessor -Mdir obj
./obj/Vtb_small_microprocessor
```

Other modules are found through `-Irtl` and `-Itb`. Leave out `tb/seg_ref_pkg.sv` for the
testbenches that do not import it.

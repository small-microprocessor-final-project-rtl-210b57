// tb_small_microprocessor: end-to-end test of the whole processor.
//
// Drives the switches as a user would: set the number and the instruction,
// raise w, wait for done, lower w. A reference model of the four storage
// registers and the display switch predicts every result. After each
// instruction the storage registers are compared with the model, and each
// "show" instruction is checked by decoding the multiplexed seven-segment
// scan back into a signed number. The run starts with the worked example of
// storing +5 in R0, -4 in R1 and computing R1 = |R1 - R0| = 9, then runs all
// sixteen functions in random order. It checks the clocks from w to done
// for each kind of instruction, and counts how often each mechanism
// happened: every function, a negative and a positive result on the
// display, the display switched off, arithmetic wrap-around, done held
// while w stays high, and a reset in the middle of the run. A mechanism that
// never happened counts as a failure.
module tb_small_microprocessor;
  import seg_ref_pkg::*;
  localparam int DIV = 4;      // refresh divider, reduced for simulation
  localparam int NRAND = 400;  // random instructions

  logic       clk = 0, resetn = 0, w = 0, done;
  logic [4:0] sw_in = '0;
  logic [7:0] ir = '0;
  logic [6:0] seg;
  logic [3:0] an;
  int checks = 0, failures = 0;

  int model [4];
  logic disp_model = 1;
  int shown;
  int n_func [16];
  int n_neg_shown = 0, n_pos_shown = 0, n_off = 0, n_wrap = 0, n_hold = 0, n_reset = 0;

  small_microprocessor #(.REFRESH_DIV(DIV)) dut (
    .clk, .resetn, .sw_in, .w, .ir, .done, .seg, .an
  );

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int reg_q(int k);
    case (k)
      0: return int'($signed(dut.g_r[0].u_r.q));
      1: return int'($signed(dut.g_r[1].u_r.q));
      2: return int'($signed(dut.g_r[2].u_r.q));
      default: return int'($signed(dut.g_r[3].u_r.q));
    endcase
  endfunction

  function automatic int wrap12(int v);
    int m = v & 12'hFFF;
    return (m >= 2048) ? m - 4096 : m;
  endfunction

  // Reads one full scan of the display; returns the value, or sets off.
  task automatic read_display(output int value, output logic off);
    logic [6:0] code [4];
    logic       seen [4];
    int mag, h;
    for (int k = 0; k < 4; k++) seen[k] = 0;
    for (int c = 0; c < 5 * DIV + 2; c++) begin
      @(posedge clk); #1;
      for (int k = 0; k < 4; k++)
        if (an == ~(4'b0001 << k)) begin
          code[k] = seg; seen[k] = 1;
        end
      chk(an == 4'b1111 || $onehot(~an), $sformatf("anodes %b", an));
    end
    off = !(seen[0] || seen[1] || seen[2] || seen[3]);
    value = 0;
    if (off) return;
    chk(seen[0] && seen[1] && seen[2] && seen[3], "not all digits scanned");
    mag = 0;
    for (int k = 2; k >= 0; k--) begin
      h = code_hex(code[k]);
      chk(h >= 0, $sformatf("digit %0d code %b", k, code[k]));
      mag = mag * 16 + (h < 0 ? 0 : h);
    end
    chk(code[3] == MINUS || code[3] == BLANK, $sformatf("sign code %b", code[3]));
    value = (code[3] == MINUS) ? -mag : mag;
  endtask

  // One instruction as the user gives it; checks the latency.
  task automatic exec(logic [7:0] instr, int num);
    int lat = 0, exp_lat, ra = int'(instr[3:2]), rb = int'(instr[1:0]);
    int f = int'(instr[7:4]), full, hold;
    int a = model[ra], b = model[rb];
    @(negedge clk);
    sw_in = (num < 0) ? {1'b1, 4'(-num)} : {1'b0, 4'(num)};
    ir = instr;
    w = 1;
    do begin
      @(negedge clk);
      lat++;
    end while (!done && lat < 30);
    exp_lat = (f == 0) ? 5 : (f <= 3) ? 4 : 6;
    chk(lat == exp_lat, $sformatf("f=%b done after %0d clocks, expected %0d", 4'(f), lat, exp_lat));
    n_func[f]++;
    hold = $urandom_range(0, 3);
    repeat (hold) begin
      @(negedge clk);
      chk(done, "done dropped while w high");
    end
    if (hold > 0) n_hold++;
    // Reference model.
    full = 0;
    case (f)
      0:  model[ra] = num;
      1:  ;
      2:  disp_model = instr[0];
      3:  model[ra] = b;
      4:  full = a + 1;
      5:  full = a - 1;
      6:  full = -a;
      7:  full = a + b;
      8:  full = a - b;
      9:  begin full = wrap12(a - b); full = full < 0 ? -full : full; end
      10: model[ra] = wrap12(a | b);
      11: model[ra] = wrap12(a & b);
      12: model[ra] = wrap12(a ^ b);
      13: model[ra] = wrap12(~(a | b));
      14: model[ra] = wrap12(~(a & b));
      15: model[ra] = wrap12(~(a ^ b));
      default: ;
    endcase
    if (f >= 4 && f <= 9) begin
      model[ra] = wrap12(full);
      if (model[ra] != full) n_wrap++;
    end
    w = 0;
    @(negedge clk);
    @(negedge clk);
    chk(!done, "done after w released");
    for (int k = 0; k < 4; k++)
      chk(reg_q(k) == model[k], $sformatf("after %b: R%0d = %0d, expected %0d",
                                          instr, k, reg_q(k), model[k]));
    if (f == 1) begin
      int v;
      logic off;
      read_display(v, off);
      chk(off == !disp_model, "display on/off state");
      if (off) n_off++;
      else begin
        chk(v == model[ra], $sformatf("display shows %0d, R%0d = %0d", v, ra, model[ra]));
        if (v < 0) n_neg_shown++; else n_pos_shown++;
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 16; k++) n_func[k] = 0;
    for (int k = 0; k < 4; k++) model[k] = 0;
    #12 resetn = 1;
    // Worked example: R0 = +5, R1 = -4, R1 = |R1 - R0|.
    exec(8'b0000_0000, 5);
    exec(8'b0000_0100, -4);
    exec(8'b0001_0100, 0);
    exec(8'b1001_0100, 0);
    chk(model[1] == 9, "worked example");
    exec(8'b0001_0100, 0);
    // Large values: 15 doubled seven times is 1920.
    exec(8'b0000_1000, 15);           // R2 = 15
    repeat (7) exec(8'b0111_1010, 0); // R2 = R2 + R2
    exec(8'b0100_1000, 0);            // 1920 -> 1921
    exec(8'b0001_1000, 0);
    // Display off and on.
    exec(8'b0010_0000, 0);
    exec(8'b0001_0000, 0);
    exec(8'b0010_0001, 0);
    // Random instructions and numbers.
    for (int i = 0; i < NRAND; i++) begin
      exec(8'($urandom), int'($urandom_range(0, 30)) - 15);
      if (i == NRAND / 2) begin
        // Reset in the middle: registers clear, display switches on.
        @(negedge clk) resetn = 0;
        @(negedge clk) resetn = 1;
        for (int k = 0; k < 4; k++) model[k] = 0;
        disp_model = 1;
        n_reset++;
        for (int k = 0; k < 4; k++) chk(reg_q(k) == 0, "register cleared by reset");
      end
    end
    // Make sure a large negative value is displayed.
    exec(8'b0000_1100, -15);
    repeat (8) exec(8'b0111_1111, 0);   // R3 = -15 * 256 wraps
    exec(8'b0001_1100, 0);
    for (int k = 0; k < 16; k++) chk(n_func[k] > 0, $sformatf("function %0d never ran", k));
    chk(n_neg_shown > 0, "no negative value shown");
    chk(n_pos_shown > 0, "no positive value shown");
    chk(n_off > 0, "display never off");
    chk(n_wrap > 0, "no wrap-around");
    chk(n_hold > 0, "done never held");
    chk(n_reset > 0, "no reset");
    $display("mechanisms: neg shown %0d, pos shown %0d, off %0d, wrap %0d, hold %0d, reset %0d",
             n_neg_shown, n_pos_shown, n_off, n_wrap, n_hold, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

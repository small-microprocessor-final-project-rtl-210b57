// tb_small_microprocessor_full: the processor at its default parameters,
// including the 500000-clock refresh divider of the display (one digit lit
// for 5 ms at 100 MHz). It stores +5 in R0 and -4 in R1, computes
// R1 = |R1 - R0|, and reads R0, the intermediate -4 and the result 9 off the
// seven-segment scan. It checks that each digit stays lit for 500000 clocks
// and that a two-operand instruction finishes six clocks after w rises
// (the w register, S1, and the four clocks S2, S10, S10a, S10b).
module tb_small_microprocessor_full;
  import seg_ref_pkg::*;
  localparam int DIV = 500000;

  logic       clk = 0, resetn = 0, w = 0, done;
  logic [4:0] sw_in = '0;
  logic [7:0] ir = '0;
  logic [6:0] seg;
  logic [3:0] an;
  int checks = 0, failures = 0;

  small_microprocessor dut (.clk, .resetn, .sw_in, .w, .ir, .done, .seg, .an);

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic exec(logic [7:0] instr, logic [4:0] sw, int exp_lat);
    int lat = 0;
    @(negedge clk);
    sw_in = sw; ir = instr; w = 1;
    do begin
      @(negedge clk);
      lat++;
    end while (!done && lat < 30);
    chk(lat == exp_lat, $sformatf("instruction %b done after %0d clocks", instr, lat));
    w = 0;
    @(negedge clk);
    @(negedge clk);
  endtask

  // Waits for digit 0 to light, then watches one full scan.
  task automatic read_display(output int value);
    logic [6:0] code [4];
    logic [3:0] prev;
    int run_len, mag, h, digit;
    forever begin
      prev = an;
      @(posedge clk); #1;
      if (an == 4'b1110 && prev != 4'b1110) break;
    end
    for (int k = 0; k < 4; k++) begin
      run_len = 0;
      digit = -1;
      for (int j = 0; j < 4; j++) if (an == ~(4'b0001 << j)) digit = j;
      chk(digit == k, $sformatf("digit %0d lit, expected %0d", digit, k));
      code[k] = seg;
      while (an == ~(4'b0001 << k)) begin
        run_len++;
        @(posedge clk); #1;
      end
      chk(run_len == DIV, $sformatf("digit %0d lit %0d clocks", k, run_len));
    end
    mag = 0;
    for (int k = 2; k >= 0; k--) begin
      h = code_hex(code[k]);
      chk(h >= 0, $sformatf("digit %0d code %b", k, code[k]));
      mag = mag * 16 + (h < 0 ? 0 : h);
    end
    value = (code[3] == MINUS) ? -mag : mag;
  endtask

  initial begin
    int v;
    #12 resetn = 1;
    exec(8'b0000_0000, 5'b00101, 5);     // R0 = +5
    exec(8'b0000_0100, 5'b10100, 5);     // R1 = -4
    exec(8'b0001_0000, 5'b00000, 4);     // show R0
    read_display(v);
    chk(v == 5, $sformatf("R0 shows %0d", v));
    exec(8'b0001_0100, 5'b00000, 4);     // show R1
    read_display(v);
    chk(v == -4, $sformatf("R1 shows %0d", v));
    exec(8'b1001_0100, 5'b00000, 6);     // R1 = |R1 - R0|
    exec(8'b0001_0100, 5'b00000, 4);     // show R1
    read_display(v);
    chk(v == 9, $sformatf("R1 shows %0d", v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * DIV) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

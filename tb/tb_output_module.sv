// tb_output_module: loads values into the output register and reads them
// back from the multiplexed display. Over one full scan each digit must be
// lit for exactly REFRESH_DIV clocks, one anode at a time, in the order
// AN0, AN1, AN2, AN3 (sign). The sign digit and three hex digits are decoded
// and compared with the loaded value; the display-off input must darken all
// anodes. Corner values -2048 and 2047 are included.
module tb_output_module;
  import seg_ref_pkg::*;
  localparam int DIV = 5;

  logic        clk = 0, rst_n = 0, e_out = 0, disp_on = 1;
  logic [11:0] bus = '0;
  logic [6:0]  seg;
  logic [3:0]  an;
  int checks = 0, failures = 0;

  output_module #(.REFRESH_DIV(DIV)) dut (
    .clk, .rst_n, .e_out, .bus, .disp_on, .seg, .an
  );

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // Watches the display for 4*DIV clocks, starting at a digit change, and
  // returns the value it shows.
  task automatic read_display(output int value);
    int lit_cnt [4];
    logic [6:0] code [4];
    logic [3:0] prev;
    int mag, sg;
    // Wait for a change to digit 0.
    forever begin
      prev = an;
      @(posedge clk); #1;
      if (an == 4'b1110 && prev != 4'b1110) break;
    end
    for (int k = 0; k < 4; k++) lit_cnt[k] = 0;
    for (int c = 0; c < 4 * DIV; c++) begin
      int idx = -1;
      for (int k = 0; k < 4; k++) if (an == ~(4'b0001 << k)) idx = k;
      checks++;
      if (idx < 0) fail($sformatf("anodes %b not one-hot", an));
      else begin
        lit_cnt[idx]++;
        code[idx] = seg;
      end
      // Digit order: 0,1,2,3 for DIV clocks each.
      checks++;
      if (idx != c / DIV) fail($sformatf("clock %0d shows digit %0d", c, idx));
      @(posedge clk); #1;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (lit_cnt[k] != DIV) fail($sformatf("digit %0d lit %0d clocks", k, lit_cnt[k]));
    end
    mag = 0;
    for (int k = 2; k >= 0; k--) begin
      int h = code_hex(code[k]);
      checks++;
      if (h < 0) fail($sformatf("digit %0d code %b", k, code[k]));
      mag = mag * 16 + (h < 0 ? 0 : h);
    end
    sg = (code[3] == MINUS) ? -1 : (code[3] == BLANK ? 1 : 0);
    checks++;
    if (sg == 0) fail($sformatf("sign digit code %b", code[3]));
    value = sg * mag;
  endtask

  task automatic show(int v);
    int got;
    @(negedge clk);
    bus = 12'(v); e_out = 1;
    @(negedge clk);
    e_out = 0; bus = 12'($urandom);   // bus changes, register must hold
    read_display(got);
    checks++;
    if (got != v) fail($sformatf("display shows %0d, loaded %0d", got, v));
  endtask

  initial begin
    #12 rst_n = 1;
    show(5); show(-4); show(9); show(-2048); show(2047); show(0);
    for (int i = 0; i < 10; i++) show(int'($urandom_range(0, 4095)) - 2048);
    // Display off: no anode lit for a whole scan.
    @(negedge clk) disp_on = 0;
    for (int c = 0; c < 4 * DIV; c++) begin
      @(posedge clk); #1;
      checks++;
      if (an !== 4'b1111) fail($sformatf("display off but anodes %b", an));
    end
    @(negedge clk) disp_on = 1;
    show(-15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mod_counter: a modulo-7 and a modulo-4 counter under a random enable.
// The count is compared with a reference, and the terminal-count pulse must
// come exactly once every N enabled clocks.
module tb_mod_counter;
  logic clk = 0, rst_n = 0, en = 0;
  logic [2:0] q7;
  logic [1:0] q4;
  logic tc7, tc4;
  int checks = 0, failures = 0;
  int m7 = 0, m4 = 0, pulses7 = 0, enabled = 0;

  mod_counter #(.N(7)) dut7 (.clk, .rst_n, .en, .q(q7), .tc(tc7));
  mod_counter #(.N(4)) dut4 (.clk, .rst_n, .en, .q(q4), .tc(tc4));

  always #5 clk = ~clk;

  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      #1;
      checks++;
      if (tc7 !== (en && m7 == 6) || tc4 !== (en && m4 == 3)) begin
        failures++;
        $display("FAIL tc7=%b tc4=%b m7=%0d m4=%0d", tc7, tc4, m7, m4);
      end
      if (tc7) pulses7++;
      if (en) begin
        enabled++;
        m7 = (m7 + 1) % 7;
        m4 = (m4 + 1) % 4;
      end
      @(posedge clk); #1;
      checks++;
      if (int'(q7) != m7 || int'(q4) != m4) begin
        failures++;
        $display("FAIL q7=%0d q4=%0d expected %0d %0d", q7, q4, m7, m4);
      end
    end
    checks++;
    if (pulses7 != enabled / 7) begin
      failures++;
      $display("FAIL %0d pulses for %0d enabled clocks", pulses7, enabled);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

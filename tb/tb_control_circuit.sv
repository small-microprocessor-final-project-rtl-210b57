// tb_control_circuit: checks the controller around its FSM. w reaches the
// FSM one clock late through its register; the instruction is captured at
// acceptance, so changing the switches afterwards must not change what
// runs; the storage register enable goes to register Ra; the display on/off
// register follows the "0010" instruction's D bit and starts on; done lights
// at the end and stays until w is released.
module tb_control_circuit;
  import micro_pkg::*;

  logic       clk = 0, rst_n = 0, w = 0, disp_onoff, done;
  logic [7:0] ir_sw = '0;
  logic [3:0] e_r;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  control_circuit dut (.clk, .rst_n, .w, .ir_sw, .ctrl, .e_r, .disp_onoff, .done);

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Runs one instruction; returns the clocks from raising w to done and the
  // storage enables seen on the way.
  task automatic run(logic [7:0] instr, output int lat, output logic [3:0] en_seen,
                     output logic [2:0] mux_seen);
    @(negedge clk);
    ir_sw = instr; w = 1;
    lat = 0; en_seen = '0; mux_seen = '0;
    @(negedge clk);
    @(negedge clk);
    ir_sw = ~instr;                 // switches move after acceptance
    lat = 1;
    while (!done) begin
      lat++;
      en_seen |= e_r;
      if (ctrl.e_dec) mux_seen = ctrl.sw_mux;
      chk(lat < 20, "instruction does not finish");
      if (lat >= 20) break;
      @(negedge clk);
    end
    lat++;
    repeat (3) begin
      @(negedge clk);
      chk(done, "done dropped while w high");
    end
    w = 0;
    @(negedge clk);
    @(negedge clk);
    chk(!done, "done still high after w released");
  endtask

  initial begin
    int lat;
    logic [3:0] en_seen;
    logic [2:0] mux_seen;
    #12 rst_n = 1;
    #1 chk(disp_onoff, "display on after reset");
    // Nothing happens while w is low.
    repeat (5) begin
      @(negedge clk);
      ir_sw = 8'($urandom);
      chk(!ctrl.e_ir && !done && e_r == 0, "idle while w low");
    end
    for (int ra = 0; ra < 4; ra++) begin
      for (int rb = 0; rb < 4; rb++) begin
        // Ra = Ra + Rb: 4 clocks between S1 and S19, plus the w register and
        // S1, so done rises on the 6th clock after w.
        run({4'b0111, 2'(ra), 2'(rb)}, lat, en_seen, mux_seen);
        chk(lat == 6, $sformatf("add latency %0d", lat));
        chk(en_seen == (4'b0001 << ra), $sformatf("add wrote %b", en_seen));
        chk(mux_seen == 3'd5, "add result not from ANS");
        // Copy Rb into Ra.
        run({4'b0011, 2'(ra), 2'(rb)}, lat, en_seen, mux_seen);
        chk(lat == 4, $sformatf("copy latency %0d", lat));
        chk(en_seen == (4'b0001 << ra), $sformatf("copy wrote %b", en_seen));
        chk(mux_seen == 3'(rb + 1), "copy source");
      end
      // Store input into Ra.
      run({4'b0000, 2'(ra), 2'b00}, lat, en_seen, mux_seen);
      chk(lat == 5, $sformatf("store latency %0d", lat));
      chk(en_seen == (4'b0001 << ra), "store target");
      chk(mux_seen == 3'd0, "store source");
    end
    // Display off, then on.
    run(8'b0010_0000, lat, en_seen, mux_seen);
    chk(!disp_onoff, "display off");
    chk(en_seen == 0, "display instruction wrote a register");
    run(8'b0010_0001, lat, en_seen, mux_seen);
    chk(disp_onoff, "display on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

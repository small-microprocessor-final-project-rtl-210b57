// tb_control_fsm: runs all sixteen functions, with random register fields,
// through the controller FSM and compares the whole control word, clock by
// clock, with the sequence expected for that function. It also checks the
// number of clocks from acceptance to done (four for a two-operand ALU
// instruction), that done holds while w stays high, and that nothing is
// accepted while w is low.
module tb_control_fsm;
  import micro_pkg::*;

  logic       clk = 0, rst_n = 0, w = 0;
  logic [7:0] ir = '0;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  control_fsm dut (.clk, .rst_n, .w, .ir, .ctrl);

  always #5 clk = ~clk;

  function automatic logic [2:0] rmux(logic [1:0] r);
    return 3'(r) + 3'd1;
  endfunction

  // Builds the expected control words from the accepting clock to done.
  function automatic void expected(logic [7:0] i, ref ctrl_t seq [$]);
    ctrl_t base, c;
    logic [3:0] f = i[7:4];
    logic [1:0] ra = i[3:2], rb = i[1:0];
    base = '0; base.sel = ra; base.disp = i[0];
    seq.delete();
    c = base; c.e_ir = 1; seq.push_back(c);         // S1
    seq.push_back(base);                            // S2
    case (f)
      4'b0000: begin
        c = base; c.e_in = 1; seq.push_back(c);
        c = base; c.sw_mux = 3'd0; c.e_dec = 1; seq.push_back(c);
      end
      4'b0001: begin
        c = base; c.sw_mux = rmux(ra); c.e_out = 1; seq.push_back(c);
      end
      4'b0010: begin
        c = base; c.e_disp = 1; seq.push_back(c);
      end
      4'b0011: begin
        c = base; c.sw_mux = rmux(rb); c.e_dec = 1; seq.push_back(c);
      end
      default: begin
        c = base; c.sw_mux = rmux(ra); c.e_a = 1; seq.push_back(c);
        c = base; c.op = f; c.e_ans = 1;
        if (f >= 4'b0111) c.sw_mux = rmux(rb);
        seq.push_back(c);
        c = base; c.sw_mux = 3'd5; c.e_dec = 1; seq.push_back(c);
      end
    endcase
    c = base; c.done = 1; seq.push_back(c);         // S19
  endfunction

  task automatic cmp(ctrl_t exp, string what);
    checks++;
    if (ctrl !== exp) begin
      failures++;
      $display("FAIL %s: ctrl=%h expected %h", what, ctrl, exp);
    end
  endtask

  initial begin
    ctrl_t seq [$];
    #12 rst_n = 1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int f = 0; f < 16; f++) begin
        logic [7:0] instr;
        int busy;
        instr = {4'(f), 4'($urandom)};
        // w low: the FSM must stay idle.
        @(negedge clk);
        ir = instr;
        repeat (2) begin
          ctrl_t idle;
          idle = '0;
          idle.sel = instr[3:2]; idle.disp = instr[0];
          #1 cmp(idle, "idle");
          @(negedge clk);
        end
        expected(instr, seq);
        w = 1;
        for (int k = 0; k < seq.size(); k++) begin
          #1 cmp(seq[k], $sformatf("f=%b step %0d", 4'(f), k));
          @(negedge clk);
        end
        // Clocks spent between S1 and S19.
        busy = seq.size() - 2;
        checks++;
        if ((f >= 4 && busy != 4) || (f == 0 && busy != 3) ||
            (f inside {1, 2, 3} && busy != 2)) begin
          failures++;
          $display("FAIL f=%0d takes %0d clocks", f, busy);
        end
        // done holds while w is high.
        repeat ($urandom_range(0, 3)) begin
          #1 cmp(seq[seq.size()-1], "done held");
          @(negedge clk);
        end
        w = 0;
        #1 cmp(seq[seq.size()-1], "done until clock");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_alu: checks all twelve ALU functions on random and corner operands
// against integer arithmetic reduced modulo 4096.
module tb_alu;
  logic [11:0] a, b, y;
  logic [3:0]  sw;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .sw, .y);

  function automatic logic [11:0] model(int ai, int bi, int s);
    int sa, sb, d;
    sa = ai; sb = bi;
    case (s)
      0:  return 12'(sa + 1);
      1:  return 12'(sa - 1);
      2:  return 12'(0 - sa);
      3:  return 12'(sa + sb);
      4:  return 12'(sa - sb);
      5: begin
        d = (sa - sb) & 12'hFFF;
        if (d >= 2048) d = d - 4096;   // difference as a 12-bit signed value
        return 12'(d < 0 ? -d : d);
      end
      6:  return 12'(ai | bi);
      7:  return 12'(ai & bi);
      8:  return 12'(ai ^ bi);
      9:  return ~12'(ai | bi);
      10: return ~12'(ai & bi);
      11: return ~12'(ai ^ bi);
      default: return 12'h000;
    endcase
  endfunction

  task automatic run(logic [11:0] av, logic [11:0] bv);
    for (int s = 0; s < 16; s++) begin
      logic [11:0] e;
      a = av; b = bv; sw = 4'(s);
      #1;
      e = model(int'(av), int'(bv), s);
      checks++;
      if (y !== e) begin
        failures++;
        $display("FAIL sw=%0d a=%h b=%h y=%h expected %h", s, av, bv, y, e);
      end
    end
  endtask

  initial begin
    run(12'h005, 12'hFFC);   // 5 and -4
    run(12'hFFC, 12'h005);   // |-4 - 5| = 9
    run(12'h7FF, 12'h001);   // overflow wraps to -2048
    run(12'h800, 12'h001);
    run(12'h000, 12'h000);
    for (int i = 0; i < 300; i++) run(12'($urandom), 12'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

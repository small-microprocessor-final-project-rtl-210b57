// tb_tc_to_sm: exhaustive check of the two's complement to sign-and-magnitude
// converter over all 4096 values, including -2048 (magnitude 800 hex).
module tb_tc_to_sm;
  logic [11:0] tc, mag;
  logic        sign;
  int checks = 0, failures = 0;

  tc_to_sm dut (.tc, .sign, .mag);

  initial begin
    for (int i = -2048; i < 2048; i++) begin
      int m;
      tc = 12'(i);
      m  = (i < 0) ? -i : i;
      #1;
      checks++;
      if (sign !== (i < 0) || int'(mag) != m) begin
        failures++;
        $display("FAIL tc=%h sign=%b mag=%h expected %0d", tc, sign, mag, i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

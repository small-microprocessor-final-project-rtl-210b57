// tb_sm_to_2c: exhaustive check of the sign-and-magnitude input converter
// against integer arithmetic for all 32 switch settings.
module tb_sm_to_2c;
  logic [4:0]  sm;
  logic [11:0] tc;
  int checks = 0, failures = 0;

  sm_to_2c dut (.sm, .tc);

  initial begin
    for (int i = 0; i < 32; i++) begin
      int v;
      sm = 5'(i);
      v = (i & 16) ? -(i & 15) : (i & 15);
      #1;
      checks++;
      if ($signed(tc) != v) begin
        failures++;
        $display("FAIL sm=%b tc=%h expected %0d", sm, tc, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sign_to_7seg: a positive sign gives a dark digit, a negative sign lights
// the middle segment (CG, bit 6) only.
module tb_sign_to_7seg;
  logic       sign;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  sign_to_7seg dut (.sign, .seg);

  initial begin
    sign = 0; #1;
    checks++;
    if (seg !== 7'b1111111) begin failures++; $display("FAIL blank %b", seg); end
    sign = 1; #1;
    checks++;
    if (seg !== 7'b0111111) begin failures++; $display("FAIL minus %b", seg); end
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

// tb_op_to_sw: checks the op code to ALU select mapping for all 16 codes:
// 0100 (increment) is ALU input 0 and 1111 (XNOR) is input 11.
module tb_op_to_sw;
  logic [3:0] op, sw;
  int checks = 0, failures = 0;
  // Expected select for op = 0..15.
  int exp_tab [16] = '{0, 0, 0, 0, 0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11};

  op_to_sw dut (.op, .sw);

  initial begin
    for (int i = 0; i < 16; i++) begin
      op = 4'(i);
      #1;
      checks++;
      if (int'(sw) != exp_tab[i]) begin
        failures++;
        $display("FAIL op=%b sw=%0d expected %0d", op, sw, exp_tab[i]);
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

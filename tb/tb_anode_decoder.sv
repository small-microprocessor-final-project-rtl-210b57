// tb_anode_decoder: every digit index with the display on and off.
module tb_anode_decoder;
  logic [1:0] q;
  logic       en;
  logic [3:0] an, exp;
  int checks = 0, failures = 0;

  anode_decoder dut (.q, .en, .an);

  initial begin
    for (int i = 0; i < 8; i++) begin
      en  = i[2];
      q   = i[1:0];
      exp = en ? ~(4'b0001 << q) : 4'b1111;
      #1;
      checks++;
      if (an !== exp) begin
        failures++;
        $display("FAIL en=%b q=%0d an=%b expected %b", en, q, an, exp);
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

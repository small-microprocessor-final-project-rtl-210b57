// tb_storage_reg_decoder: all eight input combinations of the storage
// register decoder.
module tb_storage_reg_decoder;
  logic       e_dec;
  logic [1:0] sel;
  logic [3:0] e_r, exp;
  int checks = 0, failures = 0;

  storage_reg_decoder dut (.e_dec, .sel, .e_r);

  initial begin
    for (int i = 0; i < 8; i++) begin
      e_dec = i[2];
      sel   = i[1:0];
      exp   = e_dec ? (4'b0001 << sel) : 4'b0000;
      #1;
      checks++;
      if (e_r !== exp) begin
        failures++;
        $display("FAIL e_dec=%b sel=%0d e_r=%b expected %b", e_dec, sel, e_r, exp);
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

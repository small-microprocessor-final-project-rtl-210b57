// tb_bus_mux: drives distinct random values on all six inputs and checks the
// bus for every select code, including the two unused ones.
module tb_bus_mux;
  logic [2:0]        sel;
  logic [11:0]       in_reg, ans, bus, exp;
  logic [3:0][11:0]  r;
  int checks = 0, failures = 0;

  bus_mux dut (.sel, .in_reg, .r, .ans, .bus);

  initial begin
    for (int t = 0; t < 50; t++) begin
      in_reg = 12'($urandom); ans = 12'($urandom);
      for (int k = 0; k < 4; k++) r[k] = 12'($urandom);
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s);
        case (s)
          0: exp = in_reg;
          1, 2, 3, 4: exp = r[s-1];
          5: exp = ans;
          default: exp = '0;
        endcase
        #1;
        checks++;
        if (bus !== exp) begin
          failures++;
          $display("FAIL sel=%0d bus=%h expected %h", s, bus, exp);
        end
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

// tb_seg_mux: random segment codes, every select.
module tb_seg_mux;
  logic [1:0]      q;
  logic [3:0][6:0] d;
  logic [6:0]      y;
  int checks = 0, failures = 0;

  seg_mux dut (.q, .d, .y);

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int k = 0; k < 4; k++) d[k] = 7'($urandom);
      for (int s = 0; s < 4; s++) begin
        q = 2'(s);
        #1;
        checks++;
        if (y !== d[s]) begin
          failures++;
          $display("FAIL q=%0d y=%b expected %b", s, y, d[s]);
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

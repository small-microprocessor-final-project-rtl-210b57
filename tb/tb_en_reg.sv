// tb_en_reg: random load/hold sequence on the enabled register, compared with
// a reference copy, plus the asynchronous reset and a non-zero reset value.
module tb_en_reg;
  logic clk = 0, rst_n = 0, en = 0;
  logic [11:0] d, q, model;
  logic [3:0]  d2, q2;
  int checks = 0, failures = 0;

  en_reg #(.WIDTH(12)) dut (.clk, .rst_n, .en, .d, .q);
  en_reg #(.WIDTH(4), .RESET_VAL(4'hA)) dut2 (.clk, .rst_n, .en, .d(d2), .q(q2));

  always #5 clk = ~clk;

  task automatic check(logic [11:0] got, logic [11:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    d = '0; d2 = '0;
    #12;
    check(q, 12'h000, "reset");
    check(12'(q2), 12'h00A, "reset value");
    rst_n = 1;
    model = '0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      en = 1'($urandom);
      d  = 12'($urandom);
      d2 = 4'($urandom);
      if (en) model = d;
      @(posedge clk); #1;
      check(q, model, "load/hold");
    end
    // Asynchronous reset, between clock edges.
    @(negedge clk); #2 rst_n = 0; #1;
    check(q, 12'h000, "async reset");
    check(12'(q2), 12'h00A, "async reset value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

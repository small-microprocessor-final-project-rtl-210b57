// tb_hex_to_7seg: checks each digit's lit segments against a segment list
// written out per digit (a..g, a = top, g = middle).
module tb_hex_to_7seg;
  logic [3:0] hex;
  logic [6:0] seg;
  int checks = 0, failures = 0;
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                      "acdefg", "abc", "abcdefg", "abcdfg", "abcefg",
                      "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  hex_to_7seg dut (.hex, .seg);

  function automatic logic [6:0] code(string s);
    logic [6:0] c = 7'b1111111;
    for (int k = 0; k < s.len(); k++) c[s[k] - "a"] = 1'b0;
    return c;
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) begin
      hex = 4'(i);
      #1;
      checks++;
      if (seg !== code(lit[i])) begin
        failures++;
        $display("FAIL hex=%h seg=%b expected %b", hex, seg, code(lit[i]));
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

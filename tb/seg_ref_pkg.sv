// seg_ref_pkg: reference seven-segment codes for the testbenches, built from
// the list of lit segments of each hexadecimal digit (a = top ... g =
// middle; code bit 0 = CA, active low), and the reverse lookup.
package seg_ref_pkg;
  localparam string LIT [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                                 "acdfg", "acdefg", "abc", "abcdefg",
                                 "abcdfg", "abcefg", "cdefg", "adef",
                                 "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] hex_code(int h);
    logic [6:0] c = 7'b1111111;
    string s = LIT[h];
    for (int k = 0; k < s.len(); k++) c[s[k] - "a"] = 1'b0;
    return c;
  endfunction

  // Hex value shown by a code, or -1 if it is no digit.
  function automatic int code_hex(logic [6:0] c);
    for (int h = 0; h < 16; h++) if (hex_code(h) == c) return h;
    return -1;
  endfunction

  localparam logic [6:0] BLANK = 7'b1111111;
  localparam logic [6:0] MINUS = 7'b0111111;   // g only
endpackage

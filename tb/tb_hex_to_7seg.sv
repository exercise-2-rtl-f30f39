// tb_hex_to_7seg: checks all sixteen digits against the segment lists of
// the usual hexadecimal glyphs (segments a..g, 1 = lit).
`timescale 1ns/1ps
module tb_hex_to_7seg;
  logic [3:0] hex;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  hex_to_7seg dut (.hex, .seg);

  // Lit segments of each glyph, as letters.
  string glyph[16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                       "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] from_letters(input string s);
    logic [6:0] v = '0;
    for (int i = 0; i < s.len(); i++) v[s[i] - "a"] = 1'b1;
    return v;
  endfunction

  initial begin
    for (int d = 0; d < 16; d++) begin
      hex = 4'(d);
      #1;
      checks++;
      if (seg != from_letters(glyph[d])) begin
        failures++;
        $display("FAIL digit %h: %b exp %b", d, seg, from_letters(glyph[d]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

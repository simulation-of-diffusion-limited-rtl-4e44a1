// tb_seg7_display: checks all sixteen digits against the usual hexadecimal
// glyphs, written here as lists of lit segments (a..g).
module tb_seg7_display;
  logic [3:0] digit;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  seg7_display dut (.digit(digit), .seg(seg));

  // Lit segments of each hexadecimal glyph.
  string glyph [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                        "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] segs(string s);
    logic [6:0] v = '0;
    for (int i = 0; i < s.len(); i++) v[s[i] - "a"] = 1'b1;
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      digit = 4'(d);
      #1;
      checks++;
      if (seg !== segs(glyph[d])) begin
        failures++;
        $display("FAIL: digit %h seg=%b expected %b", d, seg, segs(glyph[d]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

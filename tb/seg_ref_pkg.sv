// Reference seven-segment patterns for the testbenches, built from the list of lit
// segments of each glyph (written independently of the decoder's table). Patterns are
// active low, bit 6..0 = segments g..a.
package seg_ref_pkg;

  // Lit segments of 0..9 and A b C d E F.
  function automatic string lit_segments(int unsigned d);
    case (d)
      0:  return "abcdef";
      1:  return "bc";
      2:  return "abdeg";
      3:  return "abcdg";
      4:  return "bcfg";
      5:  return "acdfg";
      6:  return "acdefg";
      7:  return "abc";
      8:  return "abcdefg";
      9:  return "abcdfg";
      10: return "abcefg";
      11: return "cdefg";
      12: return "adef";
      13: return "bcdeg";
      14: return "adefg";
      15: return "aefg";
      default: return "";
    endcase
  endfunction

  function automatic logic [6:0] seg_of(int unsigned d);
    string s = lit_segments(d);
    logic [6:0] p = 7'h7F;
    for (int i = 0; i < s.len(); i++) p[s[i] - "a"] = 1'b0;
    return p;
  endfunction

  // Digit shown by a pattern, or -1 if the pattern is no glyph.
  function automatic int digit_of(logic [6:0] p);
    for (int d = 0; d < 16; d++) if (seg_of(d) == p) return d;
    return -1;
  endfunction

endpackage

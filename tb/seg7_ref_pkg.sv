// seg7_ref_pkg: reference seven-segment patterns for the testbenches.
//
// Each digit is listed as the letters of the segments it lights (a top,
// b top right, c bottom right, d bottom, e bottom left, f top left,
// g middle), written out independently of the decoder under test, and
// converted to the {a,b,c,d,e,f,g} bit order on demand.
package seg7_ref_pkg;

  function automatic string lit(input int value);
    case (value)
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
      10: return "abcefg";    // A
      11: return "cdefg";     // b
      12: return "adef";      // C
      13: return "bcdeg";     // d
      14: return "adefg";     // E
      15: return "aefg";      // F
      default: return "";
    endcase
  endfunction

  // Pattern as {a,b,c,d,e,f,g}, 1 = lit.
  function automatic logic [6:0] pattern(input int value);
    string s;
    logic [6:0] p;
    s = lit(value);
    p = '0;
    for (int i = 0; i < s.len(); i++) p[6 - (s[i] - "a")] = 1'b1;
    return p;
  endfunction

  // Digit shown by a pattern, or -1 if it is none of the sixteen.
  function automatic int value_of(input logic [6:0] p);
    for (int v = 0; v < 16; v++) if (pattern(v) == p) return v;
    return -1;
  endfunction

endpackage

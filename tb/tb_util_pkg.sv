// Helpers shared by the testbenches: reference seven-segment patterns built from segment letters
// (bit 6 = a ... bit 0 = g), independent of the design's own tables, and the two-phase clock.
package tb_util_pkg;

  function automatic logic [6:0] ref_segs(int d);
    string s;
    logic [6:0] r = '0;
    case (d)
      0: s = "abcdef";  1: s = "bc";     2: s = "abdeg";   3: s = "abcdg";
      4: s = "bcfg";    5: s = "acdfg";  6: s = "acdefg";  7: s = "abc";
      8: s = "abcdefg"; 9: s = "abcdfg"; default: s = "";
    endcase
    for (int i = 0; i < s.len(); i++) r[6 - (int'(s[i]) - 97)] = 1'b1;
    return r;
  endfunction

endpackage

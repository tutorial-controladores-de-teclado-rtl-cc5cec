// seg_decode_pkg: testbench helper that reads a digit back from an
// active-low seven-segment pattern (seg[0] = a ... seg[6] = g), built from
// the list of lit segments of each hex glyph. Returns -1 for an unknown
// pattern.
package seg_decode_pkg;
  function automatic int seg_to_hex(input logic [6:0] seg);
    string glyph[16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                         "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
    for (int d = 0; d < 16; d++) begin
      logic [6:0] on;
      on = '0;
      foreach (glyph[d][k]) on[glyph[d][k] - "a"] = 1'b1;
      if (seg == ~on) return d;
    end
    return -1;
  endfunction

  function automatic int seg4_to_hex(input logic [6:0] h3, input logic [6:0] h2,
                                     input logic [6:0] h1, input logic [6:0] h0);
    int d3, d2, d1, d0;
    d3 = seg_to_hex(h3);
    d2 = seg_to_hex(h2);
    d1 = seg_to_hex(h1);
    d0 = seg_to_hex(h0);
    if (d3 < 0 || d2 < 0 || d1 < 0 || d0 < 0) return -1;
    return (d3 << 12) | (d2 << 8) | (d1 << 4) | d0;
  endfunction
endpackage

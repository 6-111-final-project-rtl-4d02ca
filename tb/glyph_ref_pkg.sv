// glyph_ref_pkg: test reference for the 48x48 digit pictures. It lists which
// of the seven segments each decimal digit lights (written as letter
// strings, independent of the bit tables in the design) and one sample
// point near the middle of each segment bar, plus the picture corners,
// which are always dark.
//
// The segment letters describe this design's own glyphs, not the original
// pictures.
package glyph_ref_pkg;
  function automatic bit seg_on(input int digit, input int s);  // s: 0=a .. 6=g
    string pat[10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
    for (int k = 0; k < pat[digit].len(); k++) if (pat[digit][k] - "a" == s) return 1'b1;
    return 1'b0;
  endfunction
  // Sample points (x, y) inside the 48x48 picture, one per segment a..g.
  function automatic int sx(input int s);
    int xs[7] = '{24, 37, 37, 24, 11, 11, 24};
    return xs[s];
  endfunction
  function automatic int sy(input int s);
    int ys[7] = '{7, 15, 33, 41, 33, 15, 24};
    return ys[s];
  endfunction
endpackage

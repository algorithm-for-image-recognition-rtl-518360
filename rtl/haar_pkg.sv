// haar_pkg: constants and helpers shared by the parallel Haar wavelet pipeline.
//
// The pipeline takes N signed samples at once and runs log2(N) ranks of
// average/difference units, one register rank per level. The sample width
// and the input count default to the 8 inputs and the -127..127 range of the
// published design. Every level's values are carried one bit wider than the
// level before so that no difference can wrap; that growth is this design's
// own choice (the published interface keeps every signal in -127..127).
package haar_pkg;

  // Published configuration: 8 parallel inputs of 8-bit signed samples.
  parameter int unsigned HAAR_N    = 8;
  parameter int unsigned HAAR_IN_W = 8;

  // Width of the values leaving level `lvl` (0 = input register rank).
  function automatic int unsigned level_width(int unsigned in_w, int unsigned lvl);
    return in_w + lvl;
  endfunction

endpackage

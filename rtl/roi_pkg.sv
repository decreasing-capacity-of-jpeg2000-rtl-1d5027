// roi_pkg: constants and helper functions shared by the ROI (region of
// interest) mask path of the JPEG2000 encoder.
//
// The coefficient word is DATA_WIDTH bits. On the way from the mask decoder
// to the shift-up-background stage the most significant bit carries the ROI
// mask bit and the bits below it carry the quantized coefficient, whose sign
// is bit DATA_WIDTH-2. The 32-bit word size and the 5 decomposition levels
// follow the document; the tile size is this design's own choice.
package roi_pkg;

  // Coefficient word width (32-input shift multiplexer of the shift-up stage).
  localparam int unsigned DATA_WIDTH = 32;
  // Mask pixels packed into one memory word.
  localparam int unsigned PACK_WIDTH = 32;
  // Largest number of wavelet decomposition levels supported.
  localparam int unsigned MAX_LEVELS = 5;
  // Default tile size (not given by the document).
  localparam int unsigned TILE_WIDTH  = 128;
  localparam int unsigned TILE_HEIGHT = 128;

  // Number of subbands for a decomposition with `levels` levels: 3 per
  // level plus the final LL band.
  function automatic int unsigned num_subbands(input int unsigned levels);
    return 3 * levels + 1;
  endfunction

  // Number of mask bits in subband `idx` of a tile of w x h pixels with
  // `levels` levels. Index 0 is the deepest LL band; indices 3(L-d)+1,
  // +2, +3 are the horizontal-high, vertical-high and diagonal bands of
  // level d (d = 1 is the finest level).
  function automatic int unsigned subband_bits(input int unsigned w,
                                               input int unsigned h,
                                               input int unsigned levels,
                                               input int unsigned idx);
    int unsigned d;
    if (idx == 0) return (w >> levels) * (h >> levels);
    d = levels - (idx - 1) / 3;
    return (w >> d) * (h >> d);
  endfunction

  // Word width used to pack `bits` mask bits: PACK_WIDTH, or fewer when the
  // whole stream is shorter than one word.
  function automatic int unsigned pack_of(input int unsigned bits);
    return (bits < PACK_WIDTH) ? bits : PACK_WIDTH;
  endfunction

  // Subband code carried next to each coefficient.
  typedef logic [$clog2(3 * MAX_LEVELS + 1)-1:0] subband_t;

endpackage

// tdmmf_pkg: types, default sizes and width helpers shared by the
// time-division-multiplexed matched filter (TDMMF).
//
// A PN chip is one bit of the local code: 0 stands for +1 and 1 for -1.
// Taps that lie beyond the end of the code (the padding tap when the code
// length is not a multiple of the segment count) carry the coefficient 0,
// so a tap coefficient has three values and is held in coef_t.
// The chip-to-sign mapping is this design's own choice.
package tdmmf_pkg;

  // Tap coefficient: zero, +1 or -1.
  typedef enum logic [1:0] {
    COEF_ZERO = 2'b00,
    COEF_POS  = 2'b01,
    COEF_NEG  = 2'b11
  } coef_t;

  // Map one PN chip to its coefficient.
  function automatic coef_t chip_to_coef(input logic chip);
    return chip ? COEF_NEG : COEF_POS;
  endfunction

  // Taps per segment: the code is cut into nseg segments of ceil(len/nseg).
  function automatic int unsigned seg_taps(input int unsigned len,
                                           input int unsigned nseg);
    return (len + nseg - 1) / nseg;
  endfunction

  // Width of a segment sum: sample width plus log2 of the tap count
  // (19 bits for 128 taps of 12-bit data, 18 bits for 64 taps).
  function automatic int unsigned seg_sum_w(input int unsigned data_w,
                                            input int unsigned taps);
    return data_w + $clog2(taps);
  endfunction

  // Width of the full correlation over len chips.
  function automatic int unsigned out_w(input int unsigned data_w,
                                        input int unsigned len);
    return data_w + $clog2(len + 1);
  endfunction

endpackage

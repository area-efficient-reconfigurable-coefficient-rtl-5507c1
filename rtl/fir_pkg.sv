// fir_pkg: types and constants shared by the distributed-arithmetic (DA) FIR
// filters.
//
// bit_tag_t travels down the bit-serial pipeline next to the LUT data and says
// which bit of a pre-added word a pipeline slot carries: valid, first (bit 0,
// the accumulator restarts) and last (the sign bit, whose term is subtracted
// and after which the output is ready).
//
// The default coefficient sets are this design's own: the method gives no
// coefficient values. Both are the first half of an even-length, even-symmetric
// Hamming-windowed-sinc low-pass (cut-off at a quarter of the sample rate),
// scaled so that the largest tap is the largest positive code of the
// coefficient width: h[k] = round(M * w[k] * sinc_k / max), k = 0 .. TAPS/2-1,
// with w[k] = 0.54 - 0.46 cos(2 pi k / (TAPS-1)). The second half follows from
// h[k] = h[TAPS-1-k].
package fir_pkg;

  typedef struct packed {
    logic valid;
    logic first;
    logic last;
  } bit_tag_t;

  // Number of address bits of one partial-sum LUT (Tab.2 of the method: four).
  localparam int unsigned LUT_IN = 4;

  // 32 taps, 12-bit coefficients: h[0] .. h[15] of the fixed DA filter.
  localparam int DA_H [16] = '{-5, -6, 9, 13, -20, -29, 41, 57,
                               -77, -103, 139, 187, -261, -387, 670, 2047};

  // 40 taps, 8-bit coefficients: h[0] .. h[19], reset contents of the
  // reconfigurable (DDA) filter's coefficient buffer.
  localparam int DDA_H [20] = '{0, 0, 0, 1, -1, -1, 1, 2, -2, -3,
                                4, 5, -6, -8, 10, 12, -17, -25, 42, 127};

endpackage

// interp_pkg -- constants, sample types and filter arithmetic shared by the
// sub-pixel interpolation engines.
//
// Holds the three coefficient sets used by the design:
//   * H.264/AVC luma 6-tap half-sample filter (1,-5,20,20,-5,1);
//   * HEVC luma 8-tap filters for the 1/4, 1/2 and 3/4 positions;
//   * HEVC chroma 4-tap filters for the 1/8 .. 7/8 positions.
// Each set is exposed as a function that returns the raw (unshifted) filter
// sum of a sample window, so that the engines and the filter-array modules do
// the rounding, shifting and clipping themselves, as the equations prescribe.
// The HEVC 3/4-position luma filter is the mirror of the 1/4 one,
// (0,1,-5,17,58,-10,4,-1), whose taps sum to 64 like the other two.
// Constant products are built from shifts and adds (cmul), the multiplier-free
// variant the design is based on.  Everything here is pure combinational
// arithmetic; there is no state.
package interp_pkg;

  // Width of the intermediate and output samples of the HEVC engines.  The
  // 14-bit-precision intermediates of 8..10-bit video fit in 16 signed bits.
  localparam int unsigned IW = 16;

  // Width of a raw filter sum: wide enough for any sum formed in this design.
  localparam int unsigned SW = 32;

  typedef logic signed [IW-1:0] isample_t;
  typedef logic signed [SW-1:0] fsum_t;

  // Constant multiplication by shifts and adds: x * c is formed as the sum of
  // x shifted by the positions of the set bits of |c|, negated for c < 0.
  // With a constant c this reduces to a few adders and no multiplier.
  function automatic fsum_t cmul(input fsum_t x, input int c);
    fsum_t acc;
    int unsigned m;
    acc = '0;
    m = (c < 0) ? int'(-c) : int'(c);
    for (int i = 0; i < 8; i++)
      if (m[i]) acc = acc + (x <<< i);
    return (c < 0) ? -acc : acc;
  endfunction

  // H.264/AVC luma 6-tap filter, taps applied to w0..w5 = A(-2)..A(3).
  function automatic fsum_t h264_tap6(input fsum_t w0, w1, w2, w3, w4, w5);
    return (w0 + w5) - cmul(w1 + w4, 5) + cmul(w2 + w3, 20);
  endfunction

  // Clip to the sample range [0, 2^bd - 1].
  function automatic fsum_t clip_pix(input fsum_t v, input int unsigned bd);
    fsum_t mx;
    mx = fsum_t'((1 << bd) - 1);
    if (v < 0) return '0;
    else if (v > mx) return mx;
    else return v;
  endfunction

  // HEVC luma 8-tap coefficient, phase 1..3 (1/4, 1/2, 3/4), tap 0..7 applied
  // to A(-3)..A(4).
  function automatic int hevc_luma_coef(input int unsigned phase, input int unsigned tap);
    int c [3][8];
    c[0] = '{-1, 4, -10, 58, 17, -5, 1, 0};
    c[1] = '{-1, 4, -11, 40, 40, -11, 4, -1};
    c[2] = '{0, 1, -5, 17, 58, -10, 4, -1};
    return c[phase-1][tap];
  endfunction

  // HEVC chroma 4-tap coefficient, phase 1..7 (1/8 .. 7/8), tap 0..3 applied
  // to B(-1)..B(2).
  function automatic int hevc_chroma_coef(input int unsigned phase, input int unsigned tap);
    int c [7][4];
    c[0] = '{-2, 58, 10, -2};
    c[1] = '{-4, 54, 16, -2};
    c[2] = '{-6, 46, 28, -4};
    c[3] = '{-4, 36, 36, -4};
    c[4] = '{-4, 28, 46, -6};
    c[5] = '{-2, 16, 54, -4};
    c[6] = '{-2, 10, 58, -2};
    return c[phase-1][tap];
  endfunction

endpackage

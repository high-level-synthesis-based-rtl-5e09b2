// h264_hpi -- half-pixel interpolator array of the H.264/AVC luma engine.
//
// LANES identical 6-tap FIR filters with taps (1,-5,20,20,-5,1) work in
// parallel, one output per lane per evaluation.  Lane i filters the six
// samples win[i][0..5], i.e. the neighbours A(-2)..A(3) of one half-sample
// position, in either direction: the caller lines the window up along a row
// (b), a column (h) or a column of stored intermediate b values (j).  The
// output is the raw, unrounded filter sum; the caller applies the +16 >> 5 or
// +512 >> 10 rounding of the standard, because the unrounded sum of the
// first pass is what the second (j) pass consumes.
//
// The engine uses two instances, hpi1 and hpi2, as its description has them:
// eight lanes produce eight half pixels in a clock cycle.  The constant
// factors are realised by shifts and adds.  Purely combinational: an output
// is valid in the same cycle as its window.
module h264_hpi #(
  parameter int unsigned LANES = 8,   // filters working in parallel
  parameter int unsigned IN_W  = 16,  // signed input sample width
  parameter int unsigned OUT_W = 24   // signed output sum width
) (
  input  logic signed [IN_W-1:0]  win [LANES][6],
  output logic signed [OUT_W-1:0] sum [LANES]
);
  import interp_pkg::*;

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      fsum_t s;
      s = h264_tap6(fsum_t'(win[i][0]), fsum_t'(win[i][1]), fsum_t'(win[i][2]),
                    fsum_t'(win[i][3]), fsum_t'(win[i][4]), fsum_t'(win[i][5]));
      sum[i] = OUT_W'(s);
    end
  end

endmodule

// hevc_chroma_filterset -- FilterSetbcdefgh, one lane of the HEVC chroma
// engine.
//
// Applies the seven HEVC chroma interpolation filters to one window of four
// samples win[0..3] = B(-1)..B(2) and returns q[p-1] for the 1/8-pel phase
// p = 1..7 (a = 0 is the integer position):
//   1/8 (-2,58,10,-2)   2/8 (-4,54,16,-2)   3/8 (-6,46,28,-4)
//   4/8 (-4,36,36,-4)   5/8 (-4,28,46,-6)   6/8 (-2,16,54,-4)
//   7/8 (-2,10,58,-2)
// each arithmetically shifted right by `shift` (shift1 = BitDepth-8 for the
// one-dimensional positions, shift2 = 6 for the second, vertical pass over
// stored intermediates).  Constant products by shifts and adds.
// Combinational.
module hevc_chroma_filterset (
  input  interp_pkg::isample_t win [4],
  input  logic [3:0]           shift,
  output interp_pkg::isample_t q   [7]
);
  import interp_pkg::*;

  always_comb begin
    for (int p = 1; p <= 7; p++) begin
      fsum_t s;
      s = '0;
      for (int t = 0; t < 4; t++)
        s = s + cmul(fsum_t'(win[t]), hevc_chroma_coef(p, t));
      q[p-1] = isample_t'(s >>> shift);
    end
  end

endmodule

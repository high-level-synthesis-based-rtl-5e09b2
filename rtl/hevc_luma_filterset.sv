// hevc_luma_filterset -- FilterSetabc, one lane of the HEVC luma engine.
//
// Applies the three HEVC luma interpolation filters to one window of eight
// samples win[0..7] = A(-3)..A(4) and returns
//   q[0] = 1/4 position  (-1, 4,-10,58,17,-5, 1, 0)
//   q[1] = 1/2 position  (-1, 4,-11,40,40,-11,4,-1)
//   q[2] = 3/4 position  ( 0, 1, -5,17,58,-10,4,-1)
// each arithmetically shifted right by `shift`.  The engine lines the window
// up along a row of integer pixels (a, b, c with shift1 = BitDepth-8), along a
// column of integer pixels (d, h, n, shift1) or along a column of stored a, b
// or c intermediates (the two-dimensional positions, shift2 = 6).  The
// constant products are built from shifts and adds.  Combinational.
module hevc_luma_filterset (
  input  interp_pkg::isample_t win [8],
  input  logic [3:0]           shift,
  output interp_pkg::isample_t q   [3]
);
  import interp_pkg::*;

  always_comb begin
    for (int p = 1; p <= 3; p++) begin
      fsum_t s;
      s = '0;
      for (int t = 0; t < 8; t++)
        s = s + cmul(fsum_t'(win[t]), hevc_luma_coef(p, t));
      q[p-1] = isample_t'(s >>> shift);
    end
  end

endmodule

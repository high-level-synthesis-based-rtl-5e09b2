// h264_qpel -- quarter-pixel averaging unit of the H.264/AVC luma engine.
//
// For one row of PU integer positions it forms all sixteen samples of each
// position's quarter-pel grid from already finished integer and half samples.
// Every quarter sample is the rounded average (p + q + 1) >> 1 of its two
// nearest integer/half neighbours, following the H.264/AVC rules:
//   a=(G+b)  c=(H+b)  d=(G+h)  n=(M+h)  f=(b+j)  i=(h+j)  k=(j+m)  q=(j+s)
//   e=(b+h)  g=(b+m)  p=(h+s)  r=(m+s)
// where G is the integer sample, H the one to its right, M the one below, b
// the horizontal half sample, h the vertical one, j the centre one, m the h
// sample one to the right and s the b sample one below.
//
// Output layout: smp[v][u][x] is the sample at vertical quarter phase v and
// horizontal quarter phase u of column x, so smp[0][0] = G, smp[0][2] = b,
// smp[2][0] = h, smp[2][2] = j, smp[1][1] = e and so on (the letter grid of
// the standard read row by row).  Purely combinational.
module h264_qpel #(
  parameter int unsigned PU        = 8,  // positions in a row
  parameter int unsigned BIT_DEPTH = 8
) (
  input  logic [BIT_DEPTH-1:0] g_row [PU+1],  // integer row, columns 0..PU
  input  logic [BIT_DEPTH-1:0] m_row [PU],    // integer row below, columns 0..PU-1
  input  logic [BIT_DEPTH-1:0] b_row [PU],    // horizontal half samples of this row
  input  logic [BIT_DEPTH-1:0] s_row [PU],    // horizontal half samples of the row below
  input  logic [BIT_DEPTH-1:0] h_row [PU+1],  // vertical half samples, columns 0..PU
  input  logic [BIT_DEPTH-1:0] j_row [PU],    // centre half samples
  output logic [BIT_DEPTH-1:0] smp   [4][4][PU]
);

  function automatic logic [BIT_DEPTH-1:0] avg(input logic [BIT_DEPTH-1:0] p, q);
    logic [BIT_DEPTH:0] t;
    t = {1'b0, p} + {1'b0, q} + 1'b1;
    return t[BIT_DEPTH:1];
  endfunction

  always_comb begin
    for (int x = 0; x < PU; x++) begin
      logic [BIT_DEPTH-1:0] gg, hh_i, mm_i, b, h, j, m, s;
      gg   = g_row[x];
      hh_i = g_row[x+1];
      mm_i = m_row[x];
      b    = b_row[x];
      h    = h_row[x];
      j    = j_row[x];
      m    = h_row[x+1];
      s    = s_row[x];
      // full / half samples
      smp[0][0][x] = gg;
      smp[0][2][x] = b;
      smp[2][0][x] = h;
      smp[2][2][x] = j;
      // quarter samples next to a full sample
      smp[0][1][x] = avg(gg, b);    // a
      smp[0][3][x] = avg(hh_i, b);  // c
      smp[1][0][x] = avg(gg, h);    // d
      smp[3][0][x] = avg(mm_i, h);  // n
      // quarter samples between half samples
      smp[1][2][x] = avg(b, j);     // f
      smp[2][1][x] = avg(h, j);     // i
      smp[2][3][x] = avg(j, m);     // k
      smp[3][2][x] = avg(j, s);     // q
      // diagonal quarter samples
      smp[1][1][x] = avg(b, h);     // e
      smp[1][3][x] = avg(b, m);     // g
      smp[3][1][x] = avg(h, s);     // p
      smp[3][3][x] = avg(m, s);     // r
    end
  end

endmodule

// interp_ref_pkg -- golden reference models for the interpolation testbenches.
//
// Plain integer implementations of the H.264/AVC and HEVC interpolation
// rules, written straight from the filter equations with the coefficient
// tables spelled out here and with ordinary multiplication, so that they
// share no code with the RTL.  Each function returns one output sample of a
// prediction unit from the integer pixel grid that the engine receives.
package interp_ref_pkg;

  localparam int H264_GRID = 13;
  localparam int HEVCL_GRID = 15;
  localparam int HEVCC_GRID = 7;

  typedef int h264_grid_t [H264_GRID][H264_GRID];
  typedef int hevcl_grid_t [HEVCL_GRID][HEVCL_GRID];
  typedef int hevcc_grid_t [HEVCC_GRID][HEVCC_GRID];

  function automatic int clip255(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // ---------------------------------------------------------------- H.264
  // Grid coordinates: PU pixel (y,x) sits at grid (y+2, x+2).
  function automatic int h264_b1(input h264_grid_t g, input int gr, input int gc);
    // unrounded horizontal half sample right of grid pixel (gr,gc)
    return g[gr][gc-2] - 5*g[gr][gc-1] + 20*g[gr][gc] + 20*g[gr][gc+1]
           - 5*g[gr][gc+2] + g[gr][gc+3];
  endfunction

  function automatic int h264_h1(input h264_grid_t g, input int gr, input int gc);
    return g[gr-2][gc] - 5*g[gr-1][gc] + 20*g[gr][gc] + 20*g[gr+1][gc]
           - 5*g[gr+2][gc] + g[gr+3][gc];
  endfunction

  function automatic int h264_j(input h264_grid_t g, input int gr, input int gc);
    int s;
    s = h264_b1(g, gr-2, gc) - 5*h264_b1(g, gr-1, gc) + 20*h264_b1(g, gr, gc)
        + 20*h264_b1(g, gr+1, gc) - 5*h264_b1(g, gr+2, gc) + h264_b1(g, gr+3, gc);
    return clip255((s + 512) >>> 10);
  endfunction

  function automatic int h264_b(input h264_grid_t g, input int gr, input int gc);
    return clip255((h264_b1(g, gr, gc) + 16) >>> 5);
  endfunction

  function automatic int h264_h(input h264_grid_t g, input int gr, input int gc);
    return clip255((h264_h1(g, gr, gc) + 16) >>> 5);
  endfunction

  // Sample at vertical quarter phase v, horizontal quarter phase u of PU
  // pixel (y,x).
  function automatic int h264_sample(input h264_grid_t g, input int y, x, v, u);
    int gr, gc, G, H, M, b, h, j, m, s;
    gr = y + 2; gc = x + 2;
    G = g[gr][gc]; H = g[gr][gc+1]; M = g[gr+1][gc];
    b = h264_b(g, gr, gc); h = h264_h(g, gr, gc); j = h264_j(g, gr, gc);
    m = h264_h(g, gr, gc+1); s = h264_b(g, gr+1, gc);
    case ({v[1:0], u[1:0]})
      4'b0000: return G;
      4'b0001: return (G + b + 1) >> 1;   // a
      4'b0010: return b;
      4'b0011: return (H + b + 1) >> 1;   // c
      4'b0100: return (G + h + 1) >> 1;   // d
      4'b0101: return (b + h + 1) >> 1;   // e
      4'b0110: return (b + j + 1) >> 1;   // f
      4'b0111: return (b + m + 1) >> 1;   // g
      4'b1000: return h;
      4'b1001: return (h + j + 1) >> 1;   // i
      4'b1010: return j;
      4'b1011: return (j + m + 1) >> 1;   // k
      4'b1100: return (M + h + 1) >> 1;   // n
      4'b1101: return (h + s + 1) >> 1;   // p
      4'b1110: return (j + s + 1) >> 1;   // q
      default: return (m + s + 1) >> 1;   // r
    endcase
  endfunction

  // ---------------------------------------------------------------- HEVC luma
  function automatic int hl_coef(input int p, input int t);
    int c [4][8] = '{'{0, 0, 0, 64, 0, 0, 0, 0},
                     '{-1, 4, -10, 58, 17, -5, 1, 0},
                     '{-1, 4, -11, 40, 40, -11, 4, -1},
                     '{0, 1, -5, 17, 58, -10, 4, -1}};
    return c[p][t];
  endfunction

  // PU pixel (y,x) sits at grid (y+3, x+3).  8-bit video: shift1 = 0.
  function automatic int hl_hor(input hevcl_grid_t g, input int gr, input int x, input int u);
    int s;
    s = 0;
    for (int t = 0; t < 8; t++) s += hl_coef(u, t) * g[gr][x+t];
    return s;
  endfunction

  function automatic int hevcl_sample(input hevcl_grid_t g, input int y, x, v, u);
    int s;
    if (u == 0 && v == 0) return g[y+3][x+3] * 64;
    if (v == 0) return hl_hor(g, y+3, x, u);
    s = 0;
    if (u == 0) begin
      for (int t = 0; t < 8; t++) s += hl_coef(v, t) * g[y+t][x+3];
      return s;
    end
    for (int t = 0; t < 8; t++) s += hl_coef(v, t) * hl_hor(g, y+t, x, u);
    return s >>> 6;
  endfunction

  // ---------------------------------------------------------------- HEVC chroma
  function automatic int hc_coef(input int p, input int t);
    int c [8][4] = '{'{0, 64, 0, 0},
                     '{-2, 58, 10, -2}, '{-4, 54, 16, -2}, '{-6, 46, 28, -4},
                     '{-4, 36, 36, -4}, '{-4, 28, 46, -6}, '{-2, 16, 54, -4},
                     '{-2, 10, 58, -2}};
    return c[p][t];
  endfunction

  // PU sample (y,x) sits at grid (y+1, x+1).
  function automatic int hc_hor(input hevcc_grid_t g, input int gr, input int x, input int u);
    int s;
    s = 0;
    for (int t = 0; t < 4; t++) s += hc_coef(u, t) * g[gr][x+t];
    return s;
  endfunction

  function automatic int hevcc_sample(input hevcc_grid_t g, input int y, x, v, u);
    int s;
    if (u == 0 && v == 0) return g[y+1][x+1] * 64;
    if (v == 0) return hc_hor(g, y+1, x, u);
    s = 0;
    if (u == 0) begin
      for (int t = 0; t < 4; t++) s += hc_coef(v, t) * g[y+t][x+1];
      return s;
    end
    for (int t = 0; t < 4; t++) s += hc_coef(v, t) * hc_hor(g, y+t, x, u);
    return s >>> 6;
  endfunction

  // Test grid generator: kind 0 random, 1 all 255, 2 all 0, 3 checkerboard
  // 0/255 (drives the H.264 clip both ways), 4 random 0/255 extremes.
  function automatic int gen_pixel(input int kind, input int r, input int c);
    case (kind)
      1: return 255;
      2: return 0;
      3: return ((r + c) % 2 == 0) ? 255 : 0;
      4: return ($urandom % 2 == 0) ? 255 : 0;
      default: return int'($urandom % 256);
    endcase
  endfunction

endpackage

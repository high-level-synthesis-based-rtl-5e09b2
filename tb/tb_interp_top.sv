// tb_interp_top -- end-to-end testbench of interp_top at its default sizes.
//
// Builds a 32x32 luma picture and a 16x16 chroma picture (random texture,
// hard 0/255 stripes and flat areas) and interpolates one 16x16 luma block
// and one 8x8 chroma block of it, as a motion-compensation unit would: the
// luma block is split into four 8x8 PUs, each sent with its padding ring
// (coordinates clamped at the picture border, as for a padded reference
// picture) to both the H.264/AVC and the HEVC luma engine; the chroma block
// is split into four 4x4 PUs for the HEVC chroma engine.  All three engines
// run at once, their sources holding in_valid high through the CALC phases
// so that the in_ready back-pressure is exercised.  Every output sample is
// checked against interp_ref_pkg, and the integer phase against the picture
// itself.  The SVDC calculator gets one block of views per sign of SVDC, the
// disparity calculator a row of depth samples with a negative scale.
//
// Mechanisms counted, each of which must occur: back-pressure stalls of each
// engine, the H.264 half-sample clip at both ends, PUs of each engine,
// negative HEVC intermediates, negative and positive SVDC, negative
// disparities.
module tb_interp_top;
  import interp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;

  logic       h264_in_valid, h264_in_ready;
  logic [7:0] h264_in_row [13];
  logic       h264_out_valid, h264_out_last;
  logic [2:0] h264_out_y;
  logic [7:0] h264_out_smp [4][4][8];

  logic       hevcl_in_valid, hevcl_in_ready;
  logic [7:0] hevcl_in_row [15];
  logic       hevcl_out_valid, hevcl_out_last;
  logic [1:0] hevcl_out_xfrac;
  logic [2:0] hevcl_out_y;
  interp_pkg::isample_t hevcl_out_smp [4][8];

  logic       hevcc_in_valid, hevcc_in_ready;
  logic [7:0] hevcc_in_row [7];
  logic       hevcc_out_valid, hevcc_out_last;
  logic [2:0] hevcc_out_xfrac;
  logic [1:0] hevcc_out_y;
  interp_pkg::isample_t hevcc_out_smp [8][4];

  logic        svdc_in_valid, svdc_in_first, svdc_in_last;
  logic [7:0]  svdc_s_ref [1], svdc_s_org [1], svdc_s_dist [1];
  logic        svdc_out_valid;
  logic [31:0] svdc_d_dist, svdc_d_org;
  logic signed [32:0] svdc_value;

  logic        disp_in_valid;
  logic [7:0]  disp_v [1];
  logic signed [15:0] disp_scale, disp_offset;
  logic [4:0]  disp_shift;
  logic        disp_out_valid;
  logic signed [15:0] disp_d [1];

  interp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall_h264 = 0, n_stall_hevcl = 0, n_stall_hevcc = 0;
  int n_clip_hi = 0, n_clip_lo = 0, n_neg_hevc = 0;
  int n_pu_h264 = 0, n_pu_hevcl = 0, n_pu_hevcc = 0;
  int n_svdc_neg = 0, n_svdc_pos = 0, n_disp_neg = 0;

  // pictures
  int luma [32][32];
  int chroma [16][16];
  localparam int BX = 8, BY = 4;    // luma block origin (16x16)
  localparam int CX = 4, CY = 2;    // chroma block origin (8x8)

  function automatic int lpix(input int r, input int c);
    r = (r < 0) ? 0 : (r > 31) ? 31 : r;
    c = (c < 0) ? 0 : (c > 31) ? 31 : c;
    return luma[r][c];
  endfunction
  function automatic int cpix(input int r, input int c);
    r = (r < 0) ? 0 : (r > 15) ? 15 : r;
    c = (c < 0) ? 0 : (c > 15) ? 15 : c;
    return chroma[r][c];
  endfunction

  h264_grid_t  g264 [4];
  hevcl_grid_t ghl  [4];
  hevcc_grid_t ghc  [4];

  always @(posedge clk) if (rst_n) begin
    if (h264_in_valid  && !h264_in_ready)  n_stall_h264++;
    if (hevcl_in_valid && !hevcl_in_ready) n_stall_hevcl++;
    if (hevcc_in_valid && !hevcc_in_ready) n_stall_hevcc++;
  end

  // ---------------------------------------------------------------- drivers
  task automatic drive_h264();
    for (int p = 0; p < 4; p++)
      for (int r = 0; r < 13; r++) begin
        h264_in_valid <= 1'b1;
        for (int c = 0; c < 13; c++) h264_in_row[c] <= 8'(g264[p][r][c]);
        @(posedge clk);
        while (!h264_in_ready) @(posedge clk);
      end
    h264_in_valid <= 1'b0;
  endtask

  task automatic drive_hevcl();
    for (int p = 0; p < 4; p++)
      for (int r = 0; r < 15; r++) begin
        hevcl_in_valid <= 1'b1;
        for (int c = 0; c < 15; c++) hevcl_in_row[c] <= 8'(ghl[p][r][c]);
        @(posedge clk);
        while (!hevcl_in_ready) @(posedge clk);
      end
    hevcl_in_valid <= 1'b0;
  endtask

  task automatic drive_hevcc();
    for (int p = 0; p < 4; p++)
      for (int r = 0; r < 7; r++) begin
        hevcc_in_valid <= 1'b1;
        for (int c = 0; c < 7; c++) hevcc_in_row[c] <= 8'(ghc[p][r][c]);
        @(posedge clk);
        while (!hevcc_in_ready) @(posedge clk);
      end
    hevcc_in_valid <= 1'b0;
  endtask

  task automatic drive_svdc();
    // block 0: distorted view closer to the reference (SVDC < 0),
    // block 1: farther (SVDC > 0)
    for (int b = 0; b < 2; b++) begin
      longint ed, eo;
      ed = 0; eo = 0;
      for (int n = 0; n < 64; n++) begin
        int r, o, d;
        r = luma[BY + n / 8][BX + n % 8];
        o = (b == 0) ? 255 - r : r;
        d = (b == 0) ? r : 255 - r;
        svdc_in_valid <= 1'b1;
        svdc_in_first <= (n == 0);
        svdc_in_last  <= (n == 63);
        svdc_s_ref[0] <= 8'(r); svdc_s_org[0] <= 8'(o); svdc_s_dist[0] <= 8'(d);
        ed += (d - r) * (d - r);
        eo += (o - r) * (o - r);
        @(posedge clk);
      end
      svdc_in_valid <= 1'b0;
      #1;
      checks++;
      if (!svdc_out_valid || longint'(svdc_value) != ed - eo) begin
        failures++;
        $display("FAIL svdc block %0d: got %0d expected %0d", b, svdc_value, ed - eo);
      end
      if (svdc_value < 0) n_svdc_neg++;
      if (svdc_value > 0) n_svdc_pos++;
      @(posedge clk);
    end
  endtask

  task automatic drive_disp();
    for (int n = 0; n < 32; n++) begin
      longint e;
      disp_in_valid <= 1'b1;
      disp_v[0]     <= 8'(luma[0][n]);
      disp_scale    <= -16'sd301;
      disp_offset   <= 16'sd4000;
      disp_shift    <= 5'd6;
      e = (longint'(-301) * luma[0][n] + 4000) >>> 6;
      @(posedge clk);
      disp_in_valid <= 1'b0;
      #1;
      checks++;
      if (!disp_out_valid || disp_d[0] != 16'(e)) begin
        failures++;
        $display("FAIL disparity %0d: got %0d expected %0d", n, disp_d[0], e);
      end
      if (disp_d[0] < 0) n_disp_neg++;
    end
  endtask

  // ---------------------------------------------------------------- checkers
  int pu264 = 0, y264 = 0;
  always @(posedge clk) if (rst_n && h264_out_valid) begin
    for (int x = 0; x < 8; x++)
      for (int v = 0; v < 4; v++)
        for (int u = 0; u < 4; u++) begin
          checks++;
          if (int'(h264_out_smp[v][u][x]) != h264_sample(g264[pu264], y264, x, v, u)) begin
            failures++;
            if (failures < 20) $display("FAIL h264 pu %0d y %0d x %0d (%0d,%0d)", pu264, y264, x, v, u);
          end
        end
    // the integer phase is the picture itself
    checks++;
    if (int'(h264_out_smp[0][0][3]) !=
        luma[BY + (pu264 / 2) * 8 + y264][BX + (pu264 % 2) * 8 + 3]) begin
      failures++;
      $display("FAIL h264 integer sample does not match the picture");
    end
    if (h264_out_last) begin n_pu_h264++; pu264++; y264 = 0; end else y264++;
  end

  int puhl = 0, beathl = 0;
  always @(posedge clk) if (rst_n && hevcl_out_valid) begin
    for (int x = 0; x < 8; x++)
      for (int v = 0; v < 4; v++) begin
        int e;
        e = hevcl_sample(ghl[puhl], beathl % 8, x, v, beathl / 8);
        checks++;
        if (int'(hevcl_out_smp[v][x]) != e) begin
          failures++;
          if (failures < 20) $display("FAIL hevc luma pu %0d beat %0d x %0d v %0d", puhl, beathl, x, v);
        end
        if (hevcl_out_smp[v][x] < 0) n_neg_hevc++;
      end
    if (hevcl_out_last) begin n_pu_hevcl++; puhl++; beathl = 0; end else beathl++;
  end

  int puhc = 0, beathc = 0;
  always @(posedge clk) if (rst_n && hevcc_out_valid) begin
    for (int x = 0; x < 4; x++)
      for (int v = 0; v < 8; v++) begin
        int e;
        e = hevcc_sample(ghc[puhc], beathc % 4, x, v, beathc / 4);
        checks++;
        if (int'(hevcc_out_smp[v][x]) != e) begin
          failures++;
          if (failures < 20) $display("FAIL hevc chroma pu %0d beat %0d x %0d v %0d", puhc, beathc, x, v);
        end
        if (hevcc_out_smp[v][x] < 0) n_neg_hevc++;
      end
    if (hevcc_out_last) begin n_pu_hevcc++; puhc++; beathc = 0; end else beathc++;
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    // pictures: left half random, right half vertical/horizontal hard stripes
    // with a flat patch
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 32; c++)
        if (c < 12) luma[r][c] = int'($urandom % 256);
        else if (r < 10) luma[r][c] = ((c / 2) % 2 == 0) ? 255 : 0;
        else if (r < 20) luma[r][c] = ((r % 2) == 0) ? 0 : 255;
        else luma[r][c] = 128;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++)
        chroma[r][c] = (c < 6) ? int'($urandom % 256) : (((r + c) % 2 == 0) ? 255 : 0);
    // PU grids
    for (int p = 0; p < 4; p++) begin
      int py, px, cy, cx;
      py = BY + (p / 2) * 8; px = BX + (p % 2) * 8;
      cy = CY + (p / 2) * 4; cx = CX + (p % 2) * 4;
      for (int r = 0; r < 13; r++) for (int c = 0; c < 13; c++) g264[p][r][c] = lpix(py - 2 + r, px - 2 + c);
      for (int r = 0; r < 15; r++) for (int c = 0; c < 15; c++) ghl[p][r][c]  = lpix(py - 3 + r, px - 3 + c);
      for (int r = 0; r < 7; r++)  for (int c = 0; c < 7; c++)  ghc[p][r][c]  = cpix(cy - 1 + r, cx - 1 + c);
      // clip events of the H.264 half samples (b, h, j) of this PU
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 9; x++) begin
          int raw [3];
          raw[0] = (h264_b1(g264[p], y + 2, x + 2) + 16) >>> 5;
          raw[1] = (h264_h1(g264[p], y + 2, x + 2) + 16) >>> 5;
          raw[2] = 0;
          if (x < 8) begin
            int s;
            s = 0;
            for (int k = 0; k < 6; k++) begin
              int cf [6] = '{1, -5, 20, 20, -5, 1};
              s += cf[k] * h264_b1(g264[p], y + k, x + 2);
            end
            raw[2] = (s + 512) >>> 10;
          end
          for (int i = 0; i < 3; i++) begin
            if (raw[i] > 255) n_clip_hi++;
            if (raw[i] < 0) n_clip_lo++;
          end
        end
    end
    h264_in_valid = 0; hevcl_in_valid = 0; hevcc_in_valid = 0;
    svdc_in_valid = 0; svdc_in_first = 0; svdc_in_last = 0;
    svdc_s_ref[0] = 0; svdc_s_org[0] = 0; svdc_s_dist[0] = 0;
    disp_in_valid = 0; disp_v[0] = 0; disp_scale = 0; disp_offset = 0; disp_shift = 0;
    for (int c = 0; c < 13; c++) h264_in_row[c] = 0;
    for (int c = 0; c < 15; c++) hevcl_in_row[c] = 0;
    for (int c = 0; c < 7; c++) hevcc_in_row[c] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    fork
      drive_h264();
      drive_hevcl();
      drive_hevcc();
      drive_svdc();
      drive_disp();
    join
    wait (n_pu_h264 == 4 && n_pu_hevcl == 4 && n_pu_hevcc == 4);
    repeat (2) @(posedge clk);
    $display("mechanisms:");
    need("H.264 back-pressure stalls", n_stall_h264);
    need("HEVC luma back-pressure", n_stall_hevcl);
    need("HEVC chroma back-pressure", n_stall_hevcc);
    need("H.264 clip at 255", n_clip_hi);
    need("H.264 clip at 0", n_clip_lo);
    need("H.264 PUs", n_pu_h264);
    need("HEVC luma PUs", n_pu_hevcl);
    need("HEVC chroma PUs", n_pu_hevcc);
    need("negative HEVC samples", n_neg_hevc);
    need("negative SVDC", n_svdc_neg);
    need("positive SVDC", n_svdc_pos);
    need("negative disparities", n_disp_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: PUs done %0d/%0d/%0d", n_pu_h264, n_pu_hevcl, n_pu_hevcc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

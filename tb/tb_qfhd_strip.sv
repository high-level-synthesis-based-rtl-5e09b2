// tb_qfhd_strip -- throughput testbench: one full PU row of a QFHD
// (3840x2160) frame through each interpolation engine of interp_top.
//
// The top PU row of a QFHD luma frame is 480 PUs of 8x8, and of one 4:2:0
// chroma plane (1920x1080) 480 PUs of 4x4.  The picture is generated on the
// fly from a hash of the pixel coordinates (coordinates outside the frame are
// clamped to its edge, as for a padded reference picture), so no data file
// is needed.  All three engines are fed back to back at once; every output
// sample is compared with interp_ref_pkg.  The testbench measures the
// steady-state cycles per PU of each engine (between the first and last
// out_last), checks them against the engine's schedule (21, 47 and 39) and
// prints the frame rate that schedule gives for the 129,600 PUs of a QFHD
// frame at 102, 165 and 169 MHz, the clock rates the architecture this RTL
// is based on reports for its three engines.
module tb_qfhd_strip;
  import interp_ref_pkg::*;

  localparam int NPU     = 480;      // PUs in one PU row of the frame
  localparam int W_LUMA  = 3840, H_LUMA = 2160;
  localparam int W_CHR   = 1920, H_CHR  = 1080;
  localparam longint PUS_PER_FRAME = 129600;

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

  logic        svdc_in_valid = 1'b0, svdc_in_first = 1'b0, svdc_in_last = 1'b0;
  logic [7:0]  svdc_s_ref [1], svdc_s_org [1], svdc_s_dist [1];
  logic        svdc_out_valid;
  logic [31:0] svdc_d_dist, svdc_d_org;
  logic signed [32:0] svdc_value;

  logic        disp_in_valid = 1'b0;
  logic [7:0]  disp_v [1];
  logic signed [15:0] disp_scale = '0, disp_offset = '0;
  logic [4:0]  disp_shift = '0;
  logic        disp_out_valid;
  logic signed [15:0] disp_d [1];

  interp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Picture content: smooth gradient, a hashed texture and hard 0/255
  // stripes in turn along the row, so that every filter sees plain and
  // clipping input.
  function automatic int pix(input int r, input int c, input int w, input int h);
    int unsigned hsh;
    r = (r < 0) ? 0 : (r >= h) ? h - 1 : r;
    c = (c < 0) ? 0 : (c >= w) ? w - 1 : c;
    hsh = (32'(r) * 32'd2654435761) ^ (32'(c) * 32'd40503) ^ 32'(r * c);
    case ((c / 64) % 3)
      0: return (r * 5 + c * 3) % 256;
      1: return int'(hsh >> 13) % 256;
      default: return (((c / 2) + r) % 2 == 0) ? 255 : 0;
    endcase
  endfunction

  h264_grid_t  g264 [NPU];
  hevcl_grid_t ghl  [NPU];
  hevcc_grid_t ghc  [NPU];

  // ---------------------------------------------------------------- drivers
  task automatic drive_h264();
    for (int p = 0; p < NPU; p++)
      for (int r = 0; r < 13; r++) begin
        h264_in_valid <= 1'b1;
        for (int c = 0; c < 13; c++) h264_in_row[c] <= 8'(g264[p][r][c]);
        @(posedge clk);
        while (!h264_in_ready) @(posedge clk);
      end
    h264_in_valid <= 1'b0;
  endtask

  task automatic drive_hevcl();
    for (int p = 0; p < NPU; p++)
      for (int r = 0; r < 15; r++) begin
        hevcl_in_valid <= 1'b1;
        for (int c = 0; c < 15; c++) hevcl_in_row[c] <= 8'(ghl[p][r][c]);
        @(posedge clk);
        while (!hevcl_in_ready) @(posedge clk);
      end
    hevcl_in_valid <= 1'b0;
  endtask

  task automatic drive_hevcc();
    for (int p = 0; p < NPU; p++)
      for (int r = 0; r < 7; r++) begin
        hevcc_in_valid <= 1'b1;
        for (int c = 0; c < 7; c++) hevcc_in_row[c] <= 8'(ghc[p][r][c]);
        @(posedge clk);
        while (!hevcc_in_ready) @(posedge clk);
      end
    hevcc_in_valid <= 1'b0;
  endtask

  // ---------------------------------------------------------------- checkers
  int pu264 = 0, y264 = 0, first264 = 0, last264 = 0;
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
    if (h264_out_last) begin
      if (pu264 == 0) first264 = cycle;
      last264 = cycle;
      pu264++; y264 = 0;
    end else y264++;
  end

  int puhl = 0, beathl = 0, firsthl = 0, lasthl = 0;
  always @(posedge clk) if (rst_n && hevcl_out_valid) begin
    for (int x = 0; x < 8; x++)
      for (int v = 0; v < 4; v++) begin
        checks++;
        if (int'(hevcl_out_smp[v][x]) != hevcl_sample(ghl[puhl], beathl % 8, x, v, beathl / 8)) begin
          failures++;
          if (failures < 20) $display("FAIL hevc luma pu %0d beat %0d x %0d v %0d", puhl, beathl, x, v);
        end
      end
    if (hevcl_out_last) begin
      if (puhl == 0) firsthl = cycle;
      lasthl = cycle;
      puhl++; beathl = 0;
    end else beathl++;
  end

  int puhc = 0, beathc = 0, firsthc = 0, lasthc = 0;
  always @(posedge clk) if (rst_n && hevcc_out_valid) begin
    for (int x = 0; x < 4; x++)
      for (int v = 0; v < 8; v++) begin
        checks++;
        if (int'(hevcc_out_smp[v][x]) != hevcc_sample(ghc[puhc], beathc % 4, x, v, beathc / 4)) begin
          failures++;
          if (failures < 20) $display("FAIL hevc chroma pu %0d beat %0d x %0d v %0d", puhc, beathc, x, v);
        end
      end
    if (hevcc_out_last) begin
      if (puhc == 0) firsthc = cycle;
      lasthc = cycle;
      puhc++; beathc = 0;
    end else beathc++;
  end

  // Steady-state cycles per PU against the schedule, and the frame rate it
  // gives (in tenths of a frame per second) at the given clock.
  task automatic report(input string name, input int first, input int last,
                        input int expect_cpp, input longint mhz);
    int cpp;
    longint fps10;
    cpp = (last - first) / (NPU - 1);
    checks++;
    if (last - first != expect_cpp * (NPU - 1)) begin
      failures++;
      $display("FAIL %s: %0d cycles for %0d PUs, expected %0d per PU",
               name, last - first, NPU - 1, expect_cpp);
    end
    fps10 = (mhz * 64'd10_000_000) / (PUS_PER_FRAME * cpp);
    $display("  %-12s %0d cycles/PU -> %0d.%0d QFHD frames/s at %0d MHz",
             name, cpp, fps10 / 10, fps10 % 10, mhz);
  endtask

  initial begin
    for (int p = 0; p < NPU; p++) begin
      for (int r = 0; r < 13; r++) for (int c = 0; c < 13; c++)
        g264[p][r][c] = pix(r - 2, p * 8 + c - 2, W_LUMA, H_LUMA);
      for (int r = 0; r < 15; r++) for (int c = 0; c < 15; c++)
        ghl[p][r][c] = pix(r - 3, p * 8 + c - 3, W_LUMA, H_LUMA);
      for (int r = 0; r < 7; r++) for (int c = 0; c < 7; c++)
        ghc[p][r][c] = pix(r - 1, p * 4 + c - 1, W_CHR, H_CHR);
    end
    svdc_s_ref[0] = '0; svdc_s_org[0] = '0; svdc_s_dist[0] = '0; disp_v[0] = '0;
    h264_in_valid = 0; hevcl_in_valid = 0; hevcc_in_valid = 0;
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
    join
    wait (pu264 == NPU && puhl == NPU && puhc == NPU);
    repeat (2) @(posedge clk);
    $display("one QFHD PU row, %0d PUs per engine:", NPU);
    report("H.264 luma", first264, last264, 21, 102);
    report("HEVC luma", firsthl, lasthl, 47, 165);
    report("HEVC chroma", firsthc, lasthc, 39, 169);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPU * 50) @(posedge clk);
    failures++;
    $display("FAIL watchdog: PUs done %0d/%0d/%0d", pu264, puhl, puhc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

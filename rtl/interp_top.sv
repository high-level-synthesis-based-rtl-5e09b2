// interp_top -- the sub-pixel interpolation accelerators and the renderer-model
// arithmetic units, side by side.
//
// The three interpolation engines are independent stand-alone cores sharing
// only clock and reset, each with its own row-input and result-output ports:
//   h264_*   H.264/AVC luma, 8x8 PU from a 13x13 grid, quarter-pel results;
//   hevcl_*  HEVC luma, 8x8 PU from a 15x15 grid, quarter-pel results;
//   hevcc_*  HEVC chroma, 4x4 PU from a 7x7 grid, eighth-pel results.
// Beside them stand two units of the 3D-HEVC renderer model: the SVDC
// calculator (svdc_*) and the disparity calculator (disp_*).  The rest of
// that renderer (initializer, warping, occlusion handling, blending and the
// external memory) is not part of this RTL; the two units' inputs and outputs
// are brought out as ports where those parts would connect.
// The timing of each port group is that of the instantiated module.
module interp_top (
  input  logic                  clk,
  input  logic                  rst_n,
  // H.264/AVC luma interpolation
  input  logic                  h264_in_valid,
  output logic                  h264_in_ready,
  input  logic [7:0]            h264_in_row [13],
  output logic                  h264_out_valid,
  output logic                  h264_out_last,
  output logic [2:0]            h264_out_y,
  output logic [7:0]            h264_out_smp [4][4][8],
  // HEVC luma interpolation
  input  logic                  hevcl_in_valid,
  output logic                  hevcl_in_ready,
  input  logic [7:0]            hevcl_in_row [15],
  output logic                  hevcl_out_valid,
  output logic                  hevcl_out_last,
  output logic [1:0]            hevcl_out_xfrac,
  output logic [2:0]            hevcl_out_y,
  output interp_pkg::isample_t  hevcl_out_smp [4][8],
  // HEVC chroma interpolation
  input  logic                  hevcc_in_valid,
  output logic                  hevcc_in_ready,
  input  logic [7:0]            hevcc_in_row [7],
  output logic                  hevcc_out_valid,
  output logic                  hevcc_out_last,
  output logic [2:0]            hevcc_out_xfrac,
  output logic [1:0]            hevcc_out_y,
  output interp_pkg::isample_t  hevcc_out_smp [8][4],
  // SVDC calculator
  input  logic                  svdc_in_valid,
  input  logic                  svdc_in_first,
  input  logic                  svdc_in_last,
  input  logic [7:0]            svdc_s_ref  [1],
  input  logic [7:0]            svdc_s_org  [1],
  input  logic [7:0]            svdc_s_dist [1],
  output logic                  svdc_out_valid,
  output logic [31:0]           svdc_d_dist,
  output logic [31:0]           svdc_d_org,
  output logic signed [32:0]    svdc_value,
  // disparity calculator
  input  logic                  disp_in_valid,
  input  logic [7:0]            disp_v [1],
  input  logic signed [15:0]    disp_scale,
  input  logic signed [15:0]    disp_offset,
  input  logic [4:0]            disp_shift,
  output logic                  disp_out_valid,
  output logic signed [15:0]    disp_d [1]
);

  h264_luma_interp u_h264 (
    .clk, .rst_n,
    .in_valid (h264_in_valid),  .in_ready (h264_in_ready), .in_row (h264_in_row),
    .out_valid(h264_out_valid), .out_last (h264_out_last), .out_y  (h264_out_y),
    .out_smp  (h264_out_smp)
  );

  hevc_luma_interp u_hevc_luma (
    .clk, .rst_n,
    .in_valid (hevcl_in_valid),  .in_ready (hevcl_in_ready), .in_row (hevcl_in_row),
    .out_valid(hevcl_out_valid), .out_last (hevcl_out_last), .out_xfrac(hevcl_out_xfrac),
    .out_y    (hevcl_out_y),     .out_smp  (hevcl_out_smp)
  );

  hevc_chroma_interp u_hevc_chroma (
    .clk, .rst_n,
    .in_valid (hevcc_in_valid),  .in_ready (hevcc_in_ready), .in_row (hevcc_in_row),
    .out_valid(hevcc_out_valid), .out_last (hevcc_out_last), .out_xfrac(hevcc_out_xfrac),
    .out_y    (hevcc_out_y),     .out_smp  (hevcc_out_smp)
  );

  svdc_calc u_svdc (
    .clk, .rst_n,
    .in_valid (svdc_in_valid), .in_first(svdc_in_first), .in_last(svdc_in_last),
    .s_ref    (svdc_s_ref),    .s_org   (svdc_s_org),    .s_dist (svdc_s_dist),
    .out_valid(svdc_out_valid), .d_dist (svdc_d_dist),   .d_org  (svdc_d_org),
    .svdc     (svdc_value)
  );

  disparity_calc u_disp (
    .clk, .rst_n,
    .in_valid (disp_in_valid), .v(disp_v), .scale(disp_scale), .offset(disp_offset),
    .shift    (disp_shift),    .out_valid(disp_out_valid), .d(disp_d)
  );

endmodule

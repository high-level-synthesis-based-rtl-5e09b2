// disparity_calc -- disparity calculator of the 3D-HEVC renderer model.
//
// Converts depth samples v into horizontal disparities for warping with the
// linear mapping d = (s * v + o) >> n, where s is the transmitted scale
// factor, o the transmitted offset and n the shift (precision) parameter.
// The shift is arithmetic, so negative disparities round toward minus
// infinity.  LANES depth samples are converted per cycle.
//
// Timing: one register stage; out_valid/d follow in_valid/v by one cycle.
// The widths of s, o and d are this design's choice.
module disparity_calc #(
  parameter int unsigned LANES   = 1,   // depth samples per cycle
  parameter int unsigned DEPTH_W = 8,   // depth sample width
  parameter int unsigned PARAM_W = 16,  // width of scale and offset
  parameter int unsigned DISP_W  = 16   // width of the disparity
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [DEPTH_W-1:0]        v      [LANES],
  input  logic signed [PARAM_W-1:0] scale,
  input  logic signed [PARAM_W-1:0] offset,
  input  logic [4:0]                shift,
  output logic                      out_valid,
  output logic signed [DISP_W-1:0]  d      [LANES]
);
  localparam int unsigned PW = PARAM_W + DEPTH_W + 2;

  logic signed [DISP_W-1:0] d_next [LANES];

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic signed [PW-1:0] p;
      p = PW'(scale) * $signed({1'b0, v[l]}) + PW'(offset);
      d_next[l] = DISP_W'(p >>> shift);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int l = 0; l < LANES; l++) d[l] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) d <= d_next;
    end
  end

endmodule

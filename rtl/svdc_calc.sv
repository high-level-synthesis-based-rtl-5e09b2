// svdc_calc -- synthesized view distortion change (SVDC) calculator of the
// 3D-HEVC renderer model.
//
// Two sum-of-squared-differences units run side by side over the samples of
// the synthesized view affected by one depth block:
//   D_dist = sum (S_T,distCB - S_T,Reforg)^2
//   D_org  = sum (S_T,orgCB  - S_T,Reforg)^2
// and a subtractor forms SVDC = D_dist - D_org, which the encoder's mode
// decision uses to judge a depth coding choice.  S_T,Reforg is the view
// synthesized from the original textures and depth maps, S_T,orgCB and
// S_T,distCB the views re-rendered with the original and the coded depth
// block.
//
// Interface and timing (this design's choice): LANES samples of each of the
// three views arrive per cycle with in_valid; in_first marks the first beat of
// a block (the accumulators restart there) and in_last the final one.  The
// cycle after the in_last beat, out_valid pulses for one cycle with d_dist,
// d_org and svdc; the results stay on the outputs until the next block ends.
module svdc_calc #(
  parameter int unsigned LANES    = 1,   // samples per cycle and view
  parameter int unsigned SAMPLE_W = 8,   // texture sample width
  parameter int unsigned ACC_W    = 32   // SSD accumulator width
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic                       in_first,
  input  logic                       in_last,
  input  logic [SAMPLE_W-1:0]        s_ref  [LANES],  // S_T,Reforg
  input  logic [SAMPLE_W-1:0]        s_org  [LANES],  // S_T,orgCB
  input  logic [SAMPLE_W-1:0]        s_dist [LANES],  // S_T,distCB
  output logic                       out_valid,
  output logic [ACC_W-1:0]           d_dist,
  output logic [ACC_W-1:0]           d_org,
  output logic signed [ACC_W:0]      svdc
);

  logic [ACC_W-1:0] acc_dist, acc_org;
  logic [ACC_W-1:0] beat_dist, beat_org;
  logic [ACC_W-1:0] next_dist, next_org;

  // Squared differences of one beat, summed over the lanes.
  always_comb begin
    beat_dist = '0;
    beat_org  = '0;
    for (int l = 0; l < LANES; l++) begin
      logic signed [SAMPLE_W:0] dd, doo;
      dd  = $signed({1'b0, s_dist[l]}) - $signed({1'b0, s_ref[l]});
      doo = $signed({1'b0, s_org[l]})  - $signed({1'b0, s_ref[l]});
      beat_dist = beat_dist + ACC_W'(dd * dd);
      beat_org  = beat_org  + ACC_W'(doo * doo);
    end
    next_dist = (in_first ? '0 : acc_dist) + beat_dist;
    next_org  = (in_first ? '0 : acc_org)  + beat_org;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_dist  <= '0;
      acc_org   <= '0;
      out_valid <= 1'b0;
      d_dist    <= '0;
      d_org     <= '0;
      svdc      <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        acc_dist <= next_dist;
        acc_org  <= next_org;
        if (in_last) begin
          out_valid <= 1'b1;
          d_dist    <= next_dist;
          d_org     <= next_org;
          svdc      <= $signed({1'b0, next_dist}) - $signed({1'b0, next_org});
        end
      end
    end
  end

endmodule

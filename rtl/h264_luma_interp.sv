// h264_luma_interp -- H.264/AVC luma sub-pixel interpolation engine for one
// 8x8 prediction unit (PU).
//
// The PU is delivered as a (PU+5)x(PU+5) = 13x13 grid of integer pixels: the
// 8x8 block plus two padding rows/columns above/left and three below/right,
// which is what the 6-tap filter reaches.  Larger PUs are processed as 8x8
// pieces.  Processing follows the two-pass scheme of the architecture:
//
//   LOAD (13 cycles)  one grid row arrives per cycle.  The row is stored in
//                     the integer buffer and hpi1 filters it horizontally;
//                     the eight unrounded half-sample sums b' of the row are
//                     stored in the b buffer.
//   CALC (8 cycles)   one PU row y per cycle.  hpi1 now filters columns of
//                     the integer buffer (vertical half samples h, nine
//                     columns so that the right-hand neighbour m of column 7
//                     exists), hpi2 filters columns of the b' buffer (centre
//                     samples j), and h264_qpel forms the twelve quarter
//                     samples from the registered half samples.
//
// Rounding: b = Clip((b'+16)>>5), h likewise, j = Clip((sum of b' + 512)>>10).
// The clip to [0, 2^BIT_DEPTH-1] is the standard's and is applied here.
//
// Interface: in_valid/in_ready handshake on whole grid rows (in_row[c] is
// grid column c); in_ready is high only in LOAD.  Result rows leave one per
// cycle, registered: out_valid with out_y = PU row, out_smp[v][u][x] the
// sample at vertical/horizontal quarter phase (v,u) of column x (phase (0,0)
// is the integer pixel itself), out_last on row PU-1.  A back-to-back stream
// of PUs takes PU+5+PU = 21 cycles per PU; the first result row is
// registered on the clock edge after the one that accepts the last grid row.
module h264_luma_interp #(
  parameter int unsigned PU        = 8,  // PU edge in pixels
  parameter int unsigned BIT_DEPTH = 8   // luma sample width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [BIT_DEPTH-1:0] in_row [PU+5],
  output logic                 out_valid,
  output logic                 out_last,
  output logic [$clog2(PU)-1:0] out_y,
  output logic [BIT_DEPTH-1:0] out_smp [4][4][PU]
);
  import interp_pkg::*;

  localparam int unsigned GRID = PU + 5;
  localparam int unsigned CW   = $clog2(GRID);
  localparam int unsigned BW   = BIT_DEPTH + 8;  // width of a stored unrounded b' sum

  typedef enum logic {S_LOAD, S_CALC} state_t;
  state_t state;
  logic [CW-1:0] cnt;

  logic [BIT_DEPTH-1:0]      int_buf [GRID][GRID];
  logic signed [BW-1:0]      b_buf   [GRID][PU];

  // hpi1: PU+1 lanes, horizontal in LOAD, vertical in CALC; hpi2: PU lanes.
  logic signed [BW-1:0] hpi1_win [PU+1][6];
  logic signed [BW+7:0] hpi1_sum [PU+1];
  logic signed [BW-1:0] hpi2_win [PU][6];
  logic signed [BW+7:0] hpi2_sum [PU];

  h264_hpi #(.LANES(PU+1), .IN_W(BW), .OUT_W(BW+8)) u_hpi1 (.win(hpi1_win), .sum(hpi1_sum));
  h264_hpi #(.LANES(PU),   .IN_W(BW), .OUT_W(BW+8)) u_hpi2 (.win(hpi2_win), .sum(hpi2_sum));

  // Multiplexer in front of hpi1 and window forming for hpi2.
  always_comb begin
    for (int x = 0; x <= PU; x++)
      for (int k = 0; k < 6; k++) begin
        if (state == S_LOAD)
          hpi1_win[x][k] = (x < PU) ? BW'(in_row[x+k]) : '0;
        else
          hpi1_win[x][k] = BW'(int_buf[int'(cnt)+k][x+2]);
      end
    for (int x = 0; x < PU; x++)
      for (int k = 0; k < 6; k++)
        hpi2_win[x][k] = b_buf[int'(cnt)+k][x];
  end

  function automatic logic [BIT_DEPTH-1:0] round5(input fsum_t s);
    return BIT_DEPTH'(clip_pix((s + 16) >>> 5, BIT_DEPTH));
  endfunction

  // Quarter-pel unit inputs for PU row y = cnt (grid row cnt+2).
  logic [BIT_DEPTH-1:0] q_g [PU+1];
  logic [BIT_DEPTH-1:0] q_m [PU];
  logic [BIT_DEPTH-1:0] q_b [PU];
  logic [BIT_DEPTH-1:0] q_s [PU];
  logic [BIT_DEPTH-1:0] q_h [PU+1];
  logic [BIT_DEPTH-1:0] q_j [PU];
  logic [BIT_DEPTH-1:0] q_smp [4][4][PU];

  always_comb begin
    for (int x = 0; x <= PU; x++) begin
      q_g[x] = int_buf[int'(cnt)+2][x+2];
      q_h[x] = round5(fsum_t'(hpi1_sum[x]));
    end
    for (int x = 0; x < PU; x++) begin
      q_m[x] = int_buf[int'(cnt)+3][x+2];
      q_b[x] = round5(fsum_t'(b_buf[int'(cnt)+2][x]));
      q_s[x] = round5(fsum_t'(b_buf[int'(cnt)+3][x]));
      q_j[x] = BIT_DEPTH'(clip_pix((fsum_t'(hpi2_sum[x]) + 512) >>> 10, BIT_DEPTH));
    end
  end

  h264_qpel #(.PU(PU), .BIT_DEPTH(BIT_DEPTH)) u_qpel (
    .g_row(q_g), .m_row(q_m), .b_row(q_b), .s_row(q_s), .h_row(q_h), .j_row(q_j),
    .smp(q_smp)
  );

  assign in_ready = (state == S_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_y     <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      unique case (state)
        S_LOAD: if (in_valid) begin
          if (int'(cnt) == GRID - 1) begin
            state <= S_CALC;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_CALC: begin
          out_valid <= 1'b1;
          out_last  <= (int'(cnt) == PU - 1);
          out_y     <= $clog2(PU)'(cnt);
          if (int'(cnt) == PU - 1) begin
            state <= S_LOAD;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // Buffers and result register: no reset needed, every entry is written
  // before it is read.
  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      int_buf[cnt] <= in_row;
      for (int x = 0; x < PU; x++)
        b_buf[cnt][x] <= BW'(hpi1_sum[x]);
    end
    if (state == S_CALC)
      out_smp <= q_smp;
  end

  // The result index never leaves the PU.
  assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> int'(out_y) < PU);
  // Rows are only taken while the engine is loading.
  assert property (@(posedge clk) disable iff (!rst_n) (state == S_CALC) |-> !in_ready);

endmodule

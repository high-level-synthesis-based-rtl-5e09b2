// hevc_luma_interp -- HEVC luma sub-pixel interpolation engine for one 8x8
// prediction unit (PU).
//
// The PU arrives as a (PU+7)x(PU+7) = 15x15 grid of integer pixels: the 8x8
// block plus three padding rows/columns above/left and four below/right, the
// reach of the 8-tap filters.  Larger PUs are processed as 8x8 pieces.  A
// bank of PU = 8 FilterSetabc lanes (hevc_luma_filterset) is shared by all
// passes through an input multiplexer:
//
//   LOAD (15 cycles)  one grid row per cycle.  The row is stored in the
//                     integer buffer and the lanes filter it horizontally;
//                     the 8 a, 8 b and 8 c samples of the row (24 per cycle)
//                     go to the a/b/c buffers.
//   CALC (4 x 8 cycles) the multiplexer selects a source column set: first
//                     the integer buffer (giving d, h, n with shift1), then
//                     the a buffer (e, i, p), the b buffer (f, j, q) and the
//                     c buffer (g, k, r), each with shift2 = 6.  Each cycle
//                     handles one PU row y of one source and filters eight
//                     columns vertically.
//
// Sample precision follows the HEVC equations: a..r are not rounded back to
// pixels but kept at 14-bit precision (shift1 = BitDepth-8, shift2 = 6); the
// integer position is returned as A << (14-BitDepth), the same scale.
//
// Interface: in_valid/in_ready handshake on whole grid rows; in_ready high in
// LOAD only.  Result beats are registered, one per CALC cycle: out_xfrac is
// the horizontal quarter phase of the source (0 integer, 1 a, 2 b, 3 c),
// out_y the PU row, out_smp[v][x] the sample at vertical quarter phase v of
// column x; out_last flags the 32nd beat.  Back-to-back PUs take 15+32 = 47
// cycles each.
module hevc_luma_interp #(
  parameter int unsigned PU        = 8,  // PU edge in pixels = filter lanes
  parameter int unsigned BIT_DEPTH = 8   // luma sample width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [BIT_DEPTH-1:0]  in_row [PU+7],
  output logic                  out_valid,
  output logic                  out_last,
  output logic [1:0]            out_xfrac,
  output logic [$clog2(PU)-1:0] out_y,
  output interp_pkg::isample_t  out_smp [4][PU]
);
  import interp_pkg::*;

  localparam int unsigned GRID   = PU + 7;
  localparam int unsigned NCALC  = 4 * PU;
  localparam int unsigned CW     = $clog2(NCALC);
  localparam int unsigned YW     = $clog2(PU);
  localparam logic [3:0]  SHIFT1 = 4'(BIT_DEPTH - 8);
  localparam logic [3:0]  SHIFT2 = 4'd6;
  localparam int unsigned SHIFT3 = 14 - BIT_DEPTH;

  typedef enum logic {S_LOAD, S_CALC} state_t;
  state_t state;
  logic [CW-1:0] cnt;

  logic [BIT_DEPTH-1:0] int_buf [GRID][GRID];
  isample_t             abc_buf [3][GRID][PU];   // [a/b/c][grid row][column]

  logic [1:0]    src;   // source selected by the multiplexer in CALC
  logic [YW-1:0] y;     // PU row in CALC
  assign src = cnt[CW-1 -: 2];
  assign y   = cnt[YW-1:0];

  isample_t   fs_win [PU][8];
  isample_t   fs_q   [PU][3];
  logic [3:0] fs_shift;

  for (genvar l = 0; l < PU; l++) begin : g_fs
    hevc_luma_filterset u_fs (.win(fs_win[l]), .shift(fs_shift), .q(fs_q[l]));
  end

  // Input multiplexer of the filter bank.
  always_comb begin
    fs_shift = (state == S_LOAD || src == 2'd0) ? SHIFT1 : SHIFT2;
    for (int x = 0; x < PU; x++)
      for (int k = 0; k < 8; k++) begin
        if (state == S_LOAD)
          fs_win[x][k] = isample_t'(in_row[x+k]);
        else if (src == 2'd0)
          fs_win[x][k] = isample_t'(int_buf[int'(y)+k][x+3]);
        else
          fs_win[x][k] = abc_buf[int'(src)-1][int'(y)+k][x];
      end
  end

  // One result beat: the unfiltered source row plus three vertical phases.
  isample_t beat [4][PU];
  always_comb begin
    for (int x = 0; x < PU; x++) begin
      if (src == 2'd0)
        beat[0][x] = isample_t'(int_buf[int'(y)+3][x+3]) <<< SHIFT3;
      else
        beat[0][x] = abc_buf[int'(src)-1][int'(y)+3][x];
      for (int v = 1; v < 4; v++)
        beat[v][x] = fs_q[x][v-1];
    end
  end

  assign in_ready = (state == S_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_xfrac <= '0;
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
          out_last  <= (int'(cnt) == NCALC - 1);
          out_xfrac <= src;
          out_y     <= y;
          if (int'(cnt) == NCALC - 1) begin
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

  // Buffers and result register: written before they are read, no reset.
  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      int_buf[int'(cnt)] <= in_row;
      for (int x = 0; x < PU; x++)
        for (int p = 0; p < 3; p++)
          abc_buf[p][int'(cnt)][x] <= fs_q[x][p];
    end
    if (state == S_CALC)
      out_smp <= beat;
  end

  assert property (@(posedge clk) disable iff (!rst_n) (state == S_CALC) |-> !in_ready);

endmodule

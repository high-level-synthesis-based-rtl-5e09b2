// hevc_chroma_interp -- HEVC chroma 1/8-pel interpolation engine for one 4x4
// chroma prediction unit (PU).
//
// The PU arrives as a (PU+3)x(PU+3) = 7x7 grid of integer chroma samples: the
// 4x4 block plus one padding row/column above/left and two below/right, the
// reach of the 4-tap filters.  Larger PUs are processed as 4x4 pieces.  A bank
// of PU = 4 FilterSetbcdefgh lanes (hevc_chroma_filterset, seven filters each)
// is shared by all passes through an input multiplexer:
//
//   LOAD (7 cycles)   one grid row per cycle.  The row is stored in the
//                     integer buffer and filtered horizontally; the 4 x 7 = 28
//                     samples ab..ah of the row go to the horizontal buffers.
//   CALC (8 x 4 cycles) the multiplexer selects a source: the integer buffer
//                     (giving ba..ha, shift1), then the ab, ac, .., ah buffers
//                     (giving bV..hV for V = b..h, shift2 = 6).  Each cycle
//                     handles one PU row of one source, filtering the four
//                     columns vertically.
//
// Naming: a sample is named by its vertical then horizontal eighth phase
// (a = 0 .. h = 7), so ab is horizontal 1/8, ba vertical 1/8.  Samples are
// kept at 14-bit precision as in the HEVC equations; the integer position is
// returned as B << (14-BitDepth).
//
// Interface: in_valid/in_ready handshake on whole grid rows; in_ready high in
// LOAD only.  One registered result beat per CALC cycle: out_xfrac is the
// horizontal eighth phase of the source (0..7), out_y the PU row,
// out_smp[v][x] the sample at vertical eighth phase v of column x; out_last
// flags the 32nd beat.  Back-to-back PUs take 7+32 = 39 cycles each.
module hevc_chroma_interp #(
  parameter int unsigned PU        = 4,  // PU edge in samples = filter lanes
  parameter int unsigned BIT_DEPTH = 8   // chroma sample width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [BIT_DEPTH-1:0]  in_row [PU+3],
  output logic                  out_valid,
  output logic                  out_last,
  output logic [2:0]            out_xfrac,
  output logic [$clog2(PU)-1:0] out_y,
  output interp_pkg::isample_t  out_smp [8][PU]
);
  import interp_pkg::*;

  localparam int unsigned GRID   = PU + 3;
  localparam int unsigned NCALC  = 8 * PU;
  localparam int unsigned CW     = $clog2(NCALC);
  localparam int unsigned YW     = $clog2(PU);
  localparam logic [3:0]  SHIFT1 = 4'(BIT_DEPTH - 8);
  localparam logic [3:0]  SHIFT2 = 4'd6;
  localparam int unsigned SHIFT3 = 14 - BIT_DEPTH;

  typedef enum logic {S_LOAD, S_CALC} state_t;
  state_t state;
  logic [CW-1:0] cnt;

  logic [BIT_DEPTH-1:0] int_buf [GRID][GRID];
  isample_t             hor_buf [7][GRID][PU];   // [ab..ah][grid row][column]

  logic [2:0]    src;
  logic [YW-1:0] y;
  assign src = cnt[CW-1 -: 3];
  assign y   = cnt[YW-1:0];

  isample_t   fs_win [PU][4];
  isample_t   fs_q   [PU][7];
  logic [3:0] fs_shift;

  for (genvar l = 0; l < PU; l++) begin : g_fs
    hevc_chroma_filterset u_fs (.win(fs_win[l]), .shift(fs_shift), .q(fs_q[l]));
  end

  // Input multiplexer of the filter bank.
  always_comb begin
    fs_shift = (state == S_LOAD || src == 3'd0) ? SHIFT1 : SHIFT2;
    for (int x = 0; x < PU; x++)
      for (int k = 0; k < 4; k++) begin
        if (state == S_LOAD)
          fs_win[x][k] = isample_t'(in_row[x+k]);
        else if (src == 3'd0)
          fs_win[x][k] = isample_t'(int_buf[int'(y)+k][x+1]);
        else
          fs_win[x][k] = hor_buf[int'(src)-1][int'(y)+k][x];
      end
  end

  isample_t beat [8][PU];
  always_comb begin
    for (int x = 0; x < PU; x++) begin
      if (src == 3'd0)
        beat[0][x] = isample_t'(int_buf[int'(y)+1][x+1]) <<< SHIFT3;
      else
        beat[0][x] = hor_buf[int'(src)-1][int'(y)+1][x];
      for (int v = 1; v < 8; v++)
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
        for (int p = 0; p < 7; p++)
          hor_buf[p][int'(cnt)][x] <= fs_q[x][p];
    end
    if (state == S_CALC)
      out_smp <= beat;
  end

  assert property (@(posedge clk) disable iff (!rst_n) (state == S_CALC) |-> !in_ready);

endmodule

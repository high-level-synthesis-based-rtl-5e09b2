// tb_hevc_luma_interp -- self-checking testbench of the HEVC luma interpolation engine.
//
// Streams NBLK 15x15 integer grids (random, flat white, flat black,
// checkerboard and random extremes) into the engine, the first half with
// random idle cycles on in_valid and the rest back to back.  Every result beat
// is compared with the reference model of interp_ref_pkg: source phase
// (out_xfrac), PU row, and all 4 vertical phases of the 8 columns.  The
// timing checks are 32 consecutive beats per PU, the last beat registered
// 32 edges after the edge accepting the last grid row, and 47 cycles per PU
// when rows arrive back to back.
module tb_hevc_luma_interp;
  import interp_ref_pkg::*;

  localparam int NBLK = 24;
  localparam int GRID = 15;
  localparam int PU   = 8;
  localparam int NV   = 4;
  localparam int NB   = 32;
  localparam int CPP  = 47;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid;
  logic in_ready;
  logic [7:0] in_row [GRID];
  logic out_valid, out_last;
  logic [1:0] out_xfrac;
  logic [$clog2(PU)-1:0] out_y;
  interp_pkg::isample_t out_smp [NV][PU];

  hevc_luma_interp dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  hevcl_grid_t grids [NBLK];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int last_row_cycle [NBLK];
  int last_out_cycle [NBLK];

  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int r = 0; r < GRID; r++)
        for (int c = 0; c < GRID; c++)
          grids[b][r][c] = gen_pixel((b < 5) ? b : 0, r, c);
    in_valid = 1'b0;
    for (int c = 0; c < GRID; c++) in_row[c] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      for (int r = 0; r < GRID; r++) begin
        while (b < NBLK / 2 && ($urandom % 3 == 0)) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        for (int c = 0; c < GRID; c++) in_row[c] <= 8'(grids[b][r][c]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (r == GRID - 1) last_row_cycle[b] = cycle;
      end
    end
    in_valid <= 1'b0;
  end

  int blk = 0, beat = 0, prev_out_cycle = -1;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int src, y;
      src = beat / PU;
      y   = beat % PU;
      checks++;
      if (int'(out_xfrac) != src || int'(out_y) != y) begin
        failures++;
        $display("FAIL blk %0d beat %0d: xfrac/y %0d/%0d expected %0d/%0d",
                 blk, beat, out_xfrac, out_y, src, y);
      end
      if (beat > 0) begin
        checks++;
        if (cycle != prev_out_cycle + 1) begin
          failures++;
          $display("FAIL blk %0d: beats not consecutive", blk);
        end
      end
      prev_out_cycle = cycle;
      for (int x = 0; x < PU; x++)
        for (int v = 0; v < NV; v++) begin
          int e;
          e = hevcl_sample(grids[blk], y, x, v, src);
          checks++;
          if (int'(out_smp[v][x]) != e) begin
            failures++;
            if (failures < 20)
              $display("FAIL blk %0d y %0d x %0d phase (%0d,%0d): got %0d expected %0d",
                       blk, y, x, v, src, out_smp[v][x], e);
          end
        end
      checks++;
      if (out_last != (beat == NB - 1)) begin
        failures++;
        $display("FAIL blk %0d: out_last wrong at beat %0d", blk, beat);
      end
      if (beat == NB - 1) begin
        last_out_cycle[blk] = cycle;
        beat = 0;
        blk++;
      end else beat++;
    end
  end

  initial begin
    wait (blk == NBLK);
    @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      checks++;
      if (last_out_cycle[b] - last_row_cycle[b] != NB + 1) begin
        failures++;
        $display("FAIL blk %0d: last beat %0d cycles after last row, expected %0d",
                 b, last_out_cycle[b] - last_row_cycle[b], NB + 1);
      end
    end
    for (int b = NBLK / 2 + 1; b < NBLK; b++) begin
      checks++;
      if (last_out_cycle[b] - last_out_cycle[b-1] != CPP) begin
        failures++;
        $display("FAIL blk %0d: %0d cycles per PU, expected %0d",
                 b, last_out_cycle[b] - last_out_cycle[b-1], CPP);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: only %0d of %0d PUs finished", blk, NBLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

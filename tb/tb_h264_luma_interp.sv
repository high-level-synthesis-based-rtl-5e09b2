// tb_h264_luma_interp -- self-checking testbench of the H.264/AVC luma
// interpolation engine.
//
// Streams NBLK 13x13 integer grids (random, flat black, flat white,
// checkerboard and random extremes, the last two driving the half-sample
// clip both ways) into the engine, first with random idle cycles on
// in_valid and then back to back, and compares all 16 quarter-pel samples of
// every PU position with the reference model of interp_ref_pkg.  It also
// checks the timing: the first result row registered on the edge after the
// one that accepts the last grid row, eight consecutive result rows, and 21 cycles per PU when the
// rows arrive back to back.
module tb_h264_luma_interp;
  import interp_ref_pkg::*;

  localparam int NBLK = 24;
  localparam int GRID = 13;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid;
  logic       in_ready;
  logic [7:0] in_row [GRID];
  logic       out_valid, out_last;
  logic [2:0] out_y;
  logic [7:0] out_smp [4][4][8];

  h264_luma_interp dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  h264_grid_t grids [NBLK];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int last_row_cycle [NBLK];  // cycle of the edge that accepted row 12
  int last_out_cycle [NBLK];  // cycle of the edge that showed out_last

  // driver
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
        // first half of the blocks: random gaps
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

  // checker
  int blk = 0, exp_y = 0, prev_out_cycle = -1;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (int'(out_y) != exp_y) begin
        failures++;
        $display("FAIL blk %0d: out_y %0d expected %0d", blk, out_y, exp_y);
      end
      // rows of one PU leave on consecutive cycles
      if (exp_y > 0) begin
        checks++;
        if (cycle != prev_out_cycle + 1) begin
          failures++;
          $display("FAIL blk %0d: result rows not consecutive", blk);
        end
      end
      prev_out_cycle = cycle;
      for (int x = 0; x < 8; x++)
        for (int v = 0; v < 4; v++)
          for (int u = 0; u < 4; u++) begin
            int e;
            e = h264_sample(grids[blk], exp_y, x, v, u);
            checks++;
            if (int'(out_smp[v][u][x]) != e) begin
              failures++;
              if (failures < 20)
                $display("FAIL blk %0d y %0d x %0d phase (%0d,%0d): got %0d expected %0d",
                         blk, exp_y, x, v, u, out_smp[v][u][x], e);
            end
          end
      checks++;
      if (out_last != (exp_y == 7)) begin
        failures++;
        $display("FAIL blk %0d: out_last wrong at row %0d", blk, exp_y);
      end
      if (exp_y == 7) begin
        last_out_cycle[blk] = cycle;
        exp_y = 0;
        blk++;
      end else exp_y++;
    end
  end

  initial begin
    wait (blk == NBLK);
    @(posedge clk);
    // latency: the result rows are registered on the 8 clock edges after
    // the edge that accepted the last grid row, so the checker (sampling on
    // the following edge) sees out_last 9 edges after that edge
    for (int b = 0; b < NBLK; b++) begin
      checks++;
      if (last_out_cycle[b] - last_row_cycle[b] != 9) begin
        failures++;
        $display("FAIL blk %0d: last result %0d cycles after last row, expected 9",
                 b, last_out_cycle[b] - last_row_cycle[b]);
      end
    end
    // throughput of the back-to-back half: 13 load + 8 calc = 21 cycles
    for (int b = NBLK / 2 + 1; b < NBLK; b++) begin
      checks++;
      if (last_out_cycle[b] - last_out_cycle[b-1] != 21) begin
        failures++;
        $display("FAIL blk %0d: %0d cycles per PU, expected 21",
                 b, last_out_cycle[b] - last_out_cycle[b-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: only %0d of %0d PUs finished", blk, NBLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_svdc_calc -- self-checking testbench of the SVDC calculator.
//
// Feeds blocks of random length (1 to 64 beats, with idle cycles between
// beats) of reference, original-block and distorted-block view samples into
// a 2-lane instance.  For each block it computes both sums of squared
// differences and their difference here, and checks d_dist, d_org and svdc
// on the out_valid pulse, which must come exactly one cycle after the
// in_last beat.  Blocks where the distorted view is closer to the reference
// than the original one give a negative SVDC.
module tb_svdc_calc;
  localparam int LANES = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_first, in_last;
  logic [7:0] s_ref [LANES], s_org [LANES], s_dist [LANES];
  logic out_valid;
  logic [31:0] d_dist, d_org;
  logic signed [32:0] svdc;

  svdc_calc #(.LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, neg_seen = 0;

  initial begin
    in_valid = 0; in_first = 0; in_last = 0;
    for (int l = 0; l < LANES; l++) begin s_ref[l] = 0; s_org[l] = 0; s_dist[l] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int b = 0; b < 60; b++) begin
      longint ed, eo;
      int len;
      len = 1 + int'($urandom % 64);
      ed = 0; eo = 0;
      for (int n = 0; n < len; n++) begin
        if ($urandom % 4 == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_first <= (n == 0);
        in_last  <= (n == len - 1);
        for (int l = 0; l < LANES; l++) begin
          int r, o, d;
          r = int'($urandom % 256);
          o = (b % 2 == 0) ? int'($urandom % 256) : r + int'($urandom % 3) - 1;
          d = (b % 2 == 1) ? int'($urandom % 256) : r + int'($urandom % 3) - 1;
          if (b == 0) begin r = 0; o = 255; d = 255; end
          o = (o < 0) ? 0 : (o > 255) ? 255 : o;
          d = (d < 0) ? 0 : (d > 255) ? 255 : d;
          s_ref[l] <= 8'(r); s_org[l] <= 8'(o); s_dist[l] <= 8'(d);
          ed += (d - r) * (d - r);
          eo += (o - r) * (o - r);
        end
        @(posedge clk);
      end
      in_valid <= 0; in_first <= 0; in_last <= 0;
      // the result pulse is registered on the edge that took the last beat
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL blk %0d: no out_valid", b); end
      checks += 3;
      if (longint'(d_dist) != ed) begin failures++; $display("FAIL blk %0d d_dist %0d exp %0d", b, d_dist, ed); end
      if (longint'(d_org) != eo)  begin failures++; $display("FAIL blk %0d d_org %0d exp %0d", b, d_org, eo); end
      if (longint'(svdc) != ed - eo) begin failures++; $display("FAIL blk %0d svdc %0d exp %0d", b, svdc, ed - eo); end
      if (ed - eo < 0) neg_seen++;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid) begin failures++; $display("FAIL blk %0d: out_valid longer than one cycle", b); end
    end
    checks++;
    if (neg_seen == 0) begin failures++; $display("FAIL no negative SVDC exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

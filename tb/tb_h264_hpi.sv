// tb_h264_hpi -- self-checking testbench of the H.264/AVC half-pixel
// interpolator array.
//
// Applies random signed windows (including full-scale 8-bit pixels and
// full-scale unrounded b' sums, the two kinds of input the array receives)
// to all eight lanes and compares each lane's sum with
// w0 - 5 w1 + 20 w2 + 20 w3 - 5 w4 + w5 computed here with ordinary
// multiplication.  The array is combinational, so results are checked after
// a short settling delay.
module tb_h264_hpi;
  localparam int LANES = 8;

  logic signed [15:0] win [LANES][6];
  logic signed [23:0] sum [LANES];

  h264_hpi #(.LANES(LANES), .IN_W(16), .OUT_W(24)) dut (.win(win), .sum(sum));

  int checks = 0, failures = 0;

  initial begin
    for (int n = 0; n < 400; n++) begin
      for (int l = 0; l < LANES; l++)
        for (int k = 0; k < 6; k++) begin
          int v;
          case (n % 4)
            0: v = int'($urandom % 256);                    // pixels
            1: v = (($urandom % 2) == 0) ? 255 : 0;         // extreme pixels
            2: v = int'($urandom % 13261) - 2550;           // b' range
            default: v = ((k == 1 || k == 4) ? -2550 : 10710);
          endcase
          win[l][k] = 16'(v);
        end
      #1;
      for (int l = 0; l < LANES; l++) begin
        int e;
        e = int'(win[l][0]) - 5 * int'(win[l][1]) + 20 * int'(win[l][2])
            + 20 * int'(win[l][3]) - 5 * int'(win[l][4]) + int'(win[l][5]);
        checks++;
        if (int'(sum[l]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d: got %0d expected %0d", l, sum[l], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

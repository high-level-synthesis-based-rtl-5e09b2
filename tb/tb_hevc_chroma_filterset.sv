// tb_hevc_chroma_filterset -- self-checking testbench of FilterSetbcdefgh.
//
// Random windows of pixels (shift 0) and of signed 14-bit-precision
// intermediates (shift 6), plus full-scale patterns that reach the extremes
// of the intermediate range, are filtered and compared with the seven HEVC
// chroma filters evaluated here by ordinary multiplication and shift.
module tb_hevc_chroma_filterset;
  interp_pkg::isample_t win [4];
  logic [3:0] shift;
  interp_pkg::isample_t q [7];

  hevc_chroma_filterset dut (.*);

  int checks = 0, failures = 0;
  int c [7][4] = '{'{-2, 58, 10, -2}, '{-4, 54, 16, -2}, '{-6, 46, 28, -4},
                   '{-4, 36, 36, -4}, '{-4, 28, 46, -6}, '{-2, 16, 54, -4},
                   '{-2, 10, 58, -2}};

  initial begin
    for (int n = 0; n < 1000; n++) begin
      shift = (n % 2 == 0) ? 4'd0 : 4'd6;
      for (int t = 0; t < 4; t++) begin
        int v;
        if (shift == 0) v = (n % 6 == 0) ? (t[0] ? 0 : 255) : int'($urandom % 256);
        else if (n % 6 == 1) v = (c[3][t] < 0) ? -2040 : 18360;
        else v = int'($urandom % 20401) - 2040;
        win[t] = 16'(v);
      end
      #1;
      for (int p = 0; p < 7; p++) begin
        int s;
        s = 0;
        for (int t = 0; t < 4; t++) s += c[p][t] * int'(win[t]);
        s = s >>> shift;
        checks++;
        if (int'(q[p]) != s) begin
          failures++;
          if (failures < 10) $display("FAIL phase %0d: got %0d expected %0d", p + 1, q[p], s);
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

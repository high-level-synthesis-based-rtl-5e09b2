// tb_hevc_luma_filterset -- self-checking testbench of FilterSetabc.
//
// Random windows of pixels (shift 0) and of signed 14-bit-precision
// intermediates (shift 6), plus large alternating-sign patterns whose
// results stay inside the 16-bit output, are filtered and compared with the three HEVC
// luma filters evaluated here by ordinary multiplication and shift.
module tb_hevc_luma_filterset;
  interp_pkg::isample_t win [8];
  logic [3:0] shift;
  interp_pkg::isample_t q [3];

  hevc_luma_filterset dut (.*);

  int checks = 0, failures = 0;
  int c [3][8] = '{'{-1, 4, -10, 58, 17, -5, 1, 0},
                   '{-1, 4, -11, 40, 40, -11, 4, -1},
                   '{0, 1, -5, 17, 58, -10, 4, -1}};

  initial begin
    for (int n = 0; n < 1000; n++) begin
      shift = (n % 2 == 0) ? 4'd0 : 4'd6;
      for (int t = 0; t < 8; t++) begin
        int v;
        if (shift == 0) v = (n % 6 == 0) ? (t[0] ? 0 : 255) : int'($urandom % 256);
        else if (n % 6 == 1) v = (c[1][t] < 0) ? -6120 : 16000;
        else v = int'($urandom % 28561) - 6120;
        win[t] = 16'(v);
      end
      #1;
      for (int p = 0; p < 3; p++) begin
        int s;
        s = 0;
        for (int t = 0; t < 8; t++) s += c[p][t] * int'(win[t]);
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

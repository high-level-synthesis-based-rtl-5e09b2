// tb_h264_qpel -- self-checking testbench of the H.264/AVC quarter-pixel
// averaging unit.
//
// Drives random integer and half samples (with some all-255 rows to test the
// carry of the rounded average) and compares all 16 phase outputs of every
// column with the averaging rules, evaluated here from the letter names of
// the standard's sample grid.  Combinational; checked after a settling delay.
module tb_h264_qpel;
  localparam int PU = 8;

  logic [7:0] g_row [PU+1], m_row [PU], b_row [PU], s_row [PU], h_row [PU+1], j_row [PU];
  logic [7:0] smp [4][4][PU];

  h264_qpel #(.PU(PU), .BIT_DEPTH(8)) dut (.*);

  int checks = 0, failures = 0;

  function automatic int av(input int p, input int q);
    return (p + q + 1) / 2;
  endfunction

  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int x = 0; x <= PU; x++) begin
        g_row[x] = (n % 5 == 0) ? 8'd255 : 8'($urandom);
        h_row[x] = (n % 5 == 0) ? 8'd255 : 8'($urandom);
      end
      for (int x = 0; x < PU; x++) begin
        m_row[x] = 8'($urandom); b_row[x] = 8'($urandom);
        s_row[x] = (n % 5 == 0) ? 8'd255 : 8'($urandom);
        j_row[x] = 8'($urandom);
      end
      #1;
      for (int x = 0; x < PU; x++) begin
        int G, H, M, b, h, j, m, s;
        int e [4][4];
        G = g_row[x]; H = g_row[x+1]; M = m_row[x]; b = b_row[x]; h = h_row[x];
        j = j_row[x]; m = h_row[x+1]; s = s_row[x];
        e[0] = '{G, av(G, b), b, av(H, b)};
        e[1] = '{av(G, h), av(b, h), av(b, j), av(b, m)};
        e[2] = '{h, av(h, j), j, av(j, m)};
        e[3] = '{av(M, h), av(h, s), av(j, s), av(m, s)};
        for (int v = 0; v < 4; v++)
          for (int u = 0; u < 4; u++) begin
            checks++;
            if (int'(smp[v][u][x]) != e[v][u]) begin
              failures++;
              if (failures < 10)
                $display("FAIL x %0d phase (%0d,%0d): got %0d expected %0d",
                         x, v, u, smp[v][u][x], e[v][u]);
            end
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

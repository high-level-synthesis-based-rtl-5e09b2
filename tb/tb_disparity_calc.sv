// tb_disparity_calc -- self-checking testbench of the disparity calculator.
//
// Random depth samples, scale factors and offsets of both signs and shifts
// 0..12 go through a 4-lane instance; each output is compared one cycle later
// with (s*v + o) >> n, computed here with 64-bit arithmetic and truncated to
// the 16-bit disparity width.  Also checks that out_valid follows in_valid
// by one cycle.
module tb_disparity_calc;
  localparam int LANES = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic [7:0] v [LANES];
  logic signed [15:0] scale, offset;
  logic [4:0] shift;
  logic out_valid;
  logic signed [15:0] d [LANES];

  disparity_calc #(.LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    in_valid = 0; scale = 0; offset = 0; shift = 0;
    for (int l = 0; l < LANES; l++) v[l] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 500; n++) begin
      longint e [LANES];
      bit vld;
      vld = ($urandom % 5 != 0);
      in_valid <= vld;
      scale  <= 16'($urandom);
      offset <= 16'($urandom);
      shift  <= 5'($urandom % 13);
      for (int l = 0; l < LANES; l++) v[l] <= 8'($urandom);
      #1;
      for (int l = 0; l < LANES; l++)
        e[l] = (longint'(scale) * longint'(v[l]) + longint'(offset)) >>> shift;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != vld) begin failures++; $display("FAIL out_valid"); end
      if (vld)
        for (int l = 0; l < LANES; l++) begin
          checks++;
          if (d[l] != 16'(e[l])) begin
            failures++;
            if (failures < 10) $display("FAIL lane %0d: got %0d expected %0d", l, d[l], 16'(e[l]));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

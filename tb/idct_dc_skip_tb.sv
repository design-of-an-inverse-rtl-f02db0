// idct_dc_skip_tb: for random DC values (and the extremes) in every mode,
// compares the bypass value with the output of the full reference transform
// (tb/idct_ref.svh) of a block holding only that DC coefficient, and checks
// that an all-zero block gives 0.
module idct_dc_skip_tb;
  import idct_pkg::*;

  `include "tb/idct_ref.svh"

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  idct_mode_e              mode;
  logic                    zero;
  logic signed [IN_W-1:0]  dc;
  logic signed [OUT_W-1:0] value;

  idct_dc_skip u_dut (.mode, .zero, .dc, .value);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x [8][8];
    int f [8][8];
    int v;
    for (int n = 0; n < 900; n++) begin
      mode = idct_mode_e'(n % 3);
      case (n / 3)
        0: v = (mode == MODE_MPEG2) ? 2047 : 32767;
        1: v = (mode == MODE_MPEG2) ? -2048 : -32768;
        2: v = 1;
        3: v = -1;
        default: v = (mode == MODE_MPEG2) ? int'($urandom % 4096) - 2048 : int'($urandom % 65536) - 32768;
      endcase
      zero = (n % 7 == 0);
      if (zero) v = 0;
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) x[r][c] = 0;
      x[0][0] = v;
      ref_idct(int'(mode), x, f);
      dc = IN_W'(v);
      @(posedge clk);
      checks++;
      if (int'(value) != f[0][0] || int'(value) != f[3][3]) begin
        failures++;
        if (failures < 10) $display("mode %0d dc %0d: got %0d exp %0d", mode, v, value, f[0][0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

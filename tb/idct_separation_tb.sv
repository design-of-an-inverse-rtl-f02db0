// idct_separation_tb: loads four random columns in each mode and checks the
// even matrix (rows 0,2,4,6) and odd matrix (rows 1,3,5,7) in the 8x8 modes,
// and lanes 0..3 in the even matrix with a cleared odd matrix in the 4x4
// mode. Also checks that registers hold while load is low.
module idct_separation_tb;
  import idct_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  idct_mode_e           mode;
  logic                 load;
  logic [1:0]           j;
  logic signed [DW-1:0] col [8];
  logic signed [DW-1:0] be [4][4];
  logic signed [DW-1:0] bo [4][4];

  idct_separation u_dut (.clk, .mode, .load, .j, .col, .be, .bo);

  int x [4][8];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b0; j = '0; mode = MODE_MPEG2;
    for (int r = 0; r < 8; r++) col[r] = '0;
    for (int rep = 0; rep < 30; rep++) begin
      mode = idct_mode_e'(rep % 3);
      for (int c = 0; c < 4; c++) begin
        @(negedge clk);
        load = 1'b1; j = 2'(c);
        for (int r = 0; r < 8; r++) begin
          x[c][r] = $signed($urandom) >>> 8;
          col[r]  = DW'(x[c][r]);
        end
      end
      @(negedge clk);
      load = 1'b0;
      for (int r = 0; r < 8; r++) col[r] = DW'($urandom);
      @(negedge clk);
      for (int m = 0; m < 4; m++)
        for (int c = 0; c < 4; c++) begin
          int ee, eo;
          ee = (mode == MODE_H264_BL) ? x[c][m] : x[c][2*m];
          eo = (mode == MODE_H264_BL) ? 0 : x[c][2*m+1];
          checks += 2;
          if (int'(be[m][c]) != ee) begin failures++; $display("be[%0d][%0d] mode %0d", m, c, mode); end
          if (int'(bo[m][c]) != eo) begin failures++; $display("bo[%0d][%0d] mode %0d", m, c, mode); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

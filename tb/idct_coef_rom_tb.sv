// idct_coef_rom_tb: checks every entry of the even and odd coefficient
// matrices of all three modes against matrices built independently from the
// standards (tb/idct_ref.svh): even part [i][k] = M[i][2k], odd part
// [i][k] = M[i][2k+1] for the 8x8 modes, the whole 4x4 matrix in the even
// part for the baseline mode.
module idct_coef_rom_tb;
  import idct_pkg::*;

  `include "tb/idct_ref.svh"

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  idct_mode_e        mode;
  logic [1:0]        i, k;
  logic [KIDX_W-1:0] kidx_e, kidx_o;
  logic              neg_e, neg_o;

  idct_coef_rom #(.PART(PART_EVEN)) u_even (.mode, .i, .k, .kidx(kidx_e), .neg(neg_e));
  idct_coef_rom #(.PART(PART_ODD))  u_odd  (.mode, .i, .k, .kidx(kidx_o), .neg(neg_o));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ve, vo, ee, eo;
    for (int m = 0; m < 3; m++)
      for (int ii = 0; ii < 4; ii++)
        for (int kk = 0; kk < 4; kk++) begin
          mode = idct_mode_e'(m); i = 2'(ii); k = 2'(kk);
          @(posedge clk);
          ve = neg_e ? -longint'(kmag(int'(kidx_e))) : longint'(kmag(int'(kidx_e)));
          vo = neg_o ? -longint'(kmag(int'(kidx_o))) : longint'(kmag(int'(kidx_o)));
          ee = (m == 2) ? ref_m(m, ii, kk) : ref_m(m, ii, 2 * kk);
          eo = ref_m(m, ii, 2 * kk + 1);
          checks++;
          if (ve != ee) begin failures++; $display("EVEN mode %0d [%0d][%0d]: %0d exp %0d", m, ii, kk, ve, ee); end
          if (m != 2) begin
            checks++;
            if (vo != eo) begin failures++; $display("ODD mode %0d [%0d][%0d]: %0d exp %0d", m, ii, kk, vo, eo); end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

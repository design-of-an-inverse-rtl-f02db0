// idct_csd_mult_tb: checks the shift-add constant multiplier for every
// coefficient magnitude of the core and all three recodings (binary, CSD,
// modified CSD) against the plain product x*COEF, on random and extreme
// data words. It also checks the digit counts of the recodings against the
// published examples: cos(pi/4) = 5792 has 5 non-zero digits in all three,
// cos(7pi/16) = 1598 has 7 (binary), 4 (CSD) and 4 with one -1 (MCSD).
module idct_csd_mult_tb;
  import idct_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int PW = DW + KBITS + 1;
  logic signed [DW-1:0] x;
  logic signed [PW-1:0] p [NUM_K][3];

  for (genvar q = 0; q < NUM_K; q++) begin : g_q
    for (genvar r = 0; r < 3; r++) begin : g_r
      idct_csd_mult #(.COEF(kmag(q)), .RECODE(r), .IW(DW), .OW(PW)) u_dut (.x(x), .p(p[q][r]));
    end
  end

  function automatic int count_digits(input int c, input int rec, input int val);
    int n = 0;
    for (int i = 0; i < KBITS + 2; i++) if (recode_digit(c, i, rec) == val) n++;
    return n;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic longint mags [NUM_K] = '{5792, 8034, 7568, 6811, 4551, 3134, 1598, 8, 12, 10, 6, 3, 4, 2, 1};
    for (int n = 0; n < 300; n++) begin
      case (n)
        0: x = {1'b0, {(DW-1){1'b1}}};
        1: x = {1'b1, {(DW-1){1'b0}}};
        2: x = '0;
        3: x = -1;
        default: x = DW'($urandom);
      endcase
      @(posedge clk);
      for (int q = 0; q < NUM_K; q++)
        for (int r = 0; r < 3; r++) begin
          checks++;
          if (longint'(p[q][r]) != longint'(x) * mags[q]) begin
            failures++;
            if (failures < 10) $display("FAIL coef %0d rec %0d x %0d: got %0d", mags[q], r, x, p[q][r]);
          end
        end
    end
    // digit counts (+1s, -1s)
    checks++; if (count_digits(5792, REC_BINARY, 1) != 5 || count_digits(5792, REC_BINARY, -1) != 0) failures++;
    checks++; if (count_digits(5792, REC_CSD, 1) != 3 || count_digits(5792, REC_CSD, -1) != 2) failures++;
    checks++; if (count_digits(5792, REC_MCSD, 1) != 5 || count_digits(5792, REC_MCSD, -1) != 0) failures++;
    checks++; if (count_digits(1598, REC_BINARY, 1) != 7) failures++;
    checks++; if (count_digits(1598, REC_CSD, 1) != 2 || count_digits(1598, REC_CSD, -1) != 2) failures++;
    checks++; if (count_digits(1598, REC_MCSD, 1) != 3 || count_digits(1598, REC_MCSD, -1) != 1) failures++;
    checks++; if (count_digits(12, REC_MCSD, -1) != 0 || count_digits(3, REC_MCSD, -1) != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

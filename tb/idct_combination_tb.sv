// idct_combination_tb: feeds random even/odd results with random tags and
// checks, two cycles later, the four write ports: positions (i, 4h+j) and
// (7-i, 4h+j) with values round(g+h) and round(g-h) in the 8x8 modes, only
// (i, j) with round(g) in the 4x4 mode, with the pass's rounding shift and
// saturation (intermediate word, 9-bit MPEG-2 output, 16-bit H.264 output).
module idct_combination_tb;
  import idct_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts
  always #5 clk = ~clk;

  logic                    in_valid, busy;
  mm_tag_t                 in_tag;
  logic [1:0]              in_i, in_j1, in_j2;
  logic signed [ACC_W-1:0] g1, g2, h1, h2;
  logic [3:0]              we;
  logic [2:0]              wr_row [4];
  logic [2:0]              wr_col [4];
  logic signed [DW-1:0]    wr_data [4];

  idct_combination u_dut (.clk, .rst_n, .in_valid, .in_tag, .in_i, .in_j1, .in_j2,
                          .g1, .g2, .h1, .h2, .busy, .we, .wr_row, .wr_col, .wr_data);

  function automatic longint expect_val(input longint v, input int mode, input int pass);
    int sh;
    longint r, lo, hi;
    sh = (mode == 0) ? ((pass != 0) ? 18 : 10) : (mode == 1) ? ((pass != 0) ? 12 : 0) : ((pass != 0) ? 8 : 0);
    r  = (sh == 0) ? v : ((v + (longint'(1) << (sh - 1))) >>> sh);
    if (pass == 0) begin hi = (1 << 23) - 1; lo = -(1 << 23); end
    else if (mode == 0) begin hi = 255; lo = -256; end
    else begin hi = 32767; lo = -32768; end
    if (r > hi) r = hi;
    if (r < lo) r = lo;
    return r;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint vg1, vg2, vh1, vh2, ev [4];
    int m, ps, hf, ii, ja, jb, er [4], ec [4];
    logic [3:0] ewe;
    in_valid = 1'b0; in_tag = '0; in_i = '0; in_j1 = '0; in_j2 = '0;
    g1 = '0; g2 = '0; h1 = '0; h2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      m = n % 3; ps = (n / 3) % 2; hf = $urandom % 2;
      ii = $urandom % 4; ja = $urandom % 4; jb = (ja + 1) % 4;
      vg1 = longint'($signed($urandom)) <<< ($urandom % 8);
      vg2 = longint'($signed($urandom)) >>> ($urandom % 20);
      vh1 = longint'($signed($urandom)) >>> ($urandom % 20);
      vh2 = longint'($signed($urandom)) <<< ($urandom % 8);
      @(negedge clk);
      in_valid = 1'b1;
      in_tag = '{mode: idct_mode_e'(m), pass: ps[0], half: hf[0]};
      in_i = 2'(ii); in_j1 = 2'(ja); in_j2 = 2'(jb);
      g1 = ACC_W'(vg1); g2 = ACC_W'(vg2); h1 = ACC_W'(vh1); h2 = ACC_W'(vh2);
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!busy) failures++;
      @(negedge clk);
      if (m == 2) begin
        ewe = 4'b0011;
        ev[0] = expect_val(vg1, m, ps); ev[1] = expect_val(vg2, m, ps);
        er[0] = ii; er[1] = ii; ec[0] = ja; ec[1] = jb;
      end else begin
        ewe = 4'b1111;
        ev[0] = expect_val(vg1 + vh1, m, ps); ev[1] = expect_val(vg2 + vh2, m, ps);
        ev[2] = expect_val(vg1 - vh1, m, ps); ev[3] = expect_val(vg2 - vh2, m, ps);
        er[0] = ii; er[1] = ii; er[2] = 7 - ii; er[3] = 7 - ii;
        ec[0] = 4 * hf + ja; ec[1] = 4 * hf + jb; ec[2] = 4 * hf + ja; ec[3] = 4 * hf + jb;
      end
      checks++;
      if (we != ewe) begin failures++; $display("we %b exp %b", we, ewe); end
      for (int p = 0; p < 4; p++) if (ewe[p]) begin
        checks++;
        if (longint'(wr_data[p]) != ev[p] || int'(wr_row[p]) != er[p] || int'(wr_col[p]) != ec[p]) begin
          failures++;
          if (failures < 10) $display("n %0d mode %0d pass %0d port %0d: (%0d,%0d)=%0d exp (%0d,%0d)=%0d",
                                      n, m, ps, p, wr_row[p], wr_col[p], wr_data[p], er[p], ec[p], ev[p]);
        end
      end
      @(negedge clk);
      checks++;
      if (we != 4'b0000 || busy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

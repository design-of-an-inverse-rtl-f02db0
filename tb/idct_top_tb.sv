// idct_top_tb: end-to-end test of the multi-standard IDCT core at its
// default parameters.
//
// Streams a mix of blocks through the core: random MPEG-2 8x8 blocks (dense,
// sparse, and with extreme values that saturate the 9-bit output), H.264
// high-profile 8x8 and baseline 4x4 blocks with full 16-bit inputs, and
// all-zero and DC-only blocks of every mode, with MODE changing between
// consecutive blocks. The output side applies random back-pressure. Every
// output row is compared with a reference model built from the standards'
// matrices (tb/idct_ref.svh); MPEG-2 results are also compared with a
// double-precision IDCT (error at most 1). A final phase sends, with no
// back-pressure, one 4:2:0 macroblock of each kind: six dense MPEG-2 blocks,
// six dense H.264 high-profile blocks and 24 dense baseline 4x4 blocks. It
// prints the cycles each takes and checks that the MPEG-2 one stays below
// 400 cycles, the decoder's budget per macroblock.
// Counted mechanisms (each must occur): zero bypass, DC bypass, computed
// blocks of each mode, mode switches, output back-pressure, input stall,
// output saturation.
module idct_top_tb;
  import idct_pkg::*;

  `include "tb/idct_ref.svh"

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts
  always #5 clk = ~clk;

  logic                    in_valid, in_ready, out_valid, out_ready, out_last;
  idct_mode_e              in_mode;
  logic signed [IN_W-1:0]  in_data [4];
  logic signed [OUT_W-1:0] out_data [8];
  logic                    stat_zero_skip, stat_dc_skip, stat_computed;

  idct_top dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_mode, .in_data,
    .out_valid, .out_ready, .out_data, .out_last,
    .stat_zero_skip, .stat_dc_skip, .stat_computed
  );

  int checks = 0, failures = 0;
  localparam int NBLK = 60;
  localparam int NMB  = 6;                   // 4:2:0 macroblock of 8x8 blocks
  localparam int NMB4 = 24;                  // 4:2:0 macroblock of 4x4 blocks
  localparam int NALL = NBLK + 2 * NMB + NMB4;

  int blk_mode [NALL];
  int blk_x    [NALL][8][8];
  int blk_f    [NALL][8][8];
  int blk_real [NALL][8][8];

  int n_zero = 0, n_dc = 0, n_comp = 0, n_switch = 0, n_bp = 0, n_stall = 0, n_sat = 0;
  int n_mode [3] = '{0, 0, 0};
  bit throttle = 1'b1;

  function automatic int rnd_range(input int lo, input int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  task automatic make_block(input int b, input int mode, input int kind);
    int n, lo, hi, s;
    n  = (mode == 2) ? 4 : 8;
    lo = (mode == 0) ? -2048 : -32768;
    hi = (mode == 0) ? 2047 : 32767;
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) blk_x[b][r][c] = 0;
    case (kind)
      0: ;                                                     // all zero
      1: blk_x[b][0][0] = (mode == 0) ? rnd_range(-2048, 2047) : rnd_range(-4000, 4000);
      2: for (int r = 0; r < n; r++) for (int c = 0; c < n; c++)   // dense, moderate
           blk_x[b][r][c] = (mode == 0) ? rnd_range(-256, 255) : rnd_range(-300, 300);
      3: for (int k = 0; k < 5; k++)                                // sparse
           blk_x[b][$urandom % n][$urandom % n] = (mode == 0) ? rnd_range(-600, 600) : rnd_range(-2000, 2000);
      default: begin                                                // extreme
        s = rnd_range(0, 1);
        for (int r = 0; r < n; r++) for (int c = 0; c < n; c++)
          blk_x[b][r][c] = ($urandom % 3 == 0) ? ((s != 0) ? hi : lo) : rnd_range(lo / 8, hi / 8);
      end
    endcase
    blk_mode[b] = mode;
    ref_idct(mode, blk_x[b], blk_f[b]);
    if (mode == 0) real_idct8(blk_x[b], blk_real[b]);
  endtask

  // ---------------- input driver ----------------
  int in_cycles_start, mb_first_cycle, mb_last_cycle;
  int mb_cycles [3];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Beats are driven at the falling edge; a beat is taken at the next
  // rising edge if in_ready is high, which is stable in between.
  task automatic send_block(input int b);
    int beats;
    beats = (blk_mode[b] == 2) ? 4 : 16;
    for (int t = 0; t < beats; t++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_mode  = idct_mode_e'(blk_mode[b]);
      for (int l = 0; l < 4; l++)
        in_data[l] = (blk_mode[b] == 2) ? IN_W'(blk_x[b][t][l]) : IN_W'(blk_x[b][t/2][4*(t%2)+l]);
      while (!in_ready) begin
        n_stall++;
        @(negedge clk);
      end
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  // ---------------- output checker ----------------
  int ob = 0, orow = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && !out_ready) n_bp++;
      if (out_valid && out_ready) begin
        automatic int n = (blk_mode[ob] == 2) ? 4 : 8;
        for (int l = 0; l < 8; l++) begin
          automatic int exp = (l < n) ? blk_f[ob][orow][l] : 0;
          checks++;
          if (int'(out_data[l]) != exp) begin
            failures++;
            if (failures < 10)
              $display("MISMATCH block %0d mode %0d row %0d lane %0d: got %0d exp %0d",
                       ob, blk_mode[ob], orow, l, out_data[l], exp);
          end
          if (blk_mode[ob] == 0) begin
            checks++;
            if (int'(out_data[l]) - blk_real[ob][orow][l] > 1 ||
                blk_real[ob][orow][l] - int'(out_data[l]) > 1) begin
              failures++;
              $display("ACCURACY block %0d row %0d lane %0d: got %0d real %0d",
                       ob, orow, l, out_data[l], blk_real[ob][orow][l]);
            end
          end
          if ((blk_mode[ob] == 0 && (out_data[l] == 255 || out_data[l] == -256)) ||
              (out_data[l] == 16'sh7fff || out_data[l] == -16'sh8000)) n_sat++;
        end
        checks++;
        if (out_last != (orow == n - 1)) begin
          failures++;
          $display("LAST flag wrong at block %0d row %0d", ob, orow);
        end
        if (orow == n - 1) begin
          orow = 0;
          mb_last_cycle = cycle;
          ob++;
        end else orow++;
      end
    end
  end

  always @(posedge clk) begin
    out_ready <= throttle ? ($urandom % 4 != 0) : 1'b1;
    if (stat_zero_skip) n_zero++;
    if (stat_dc_skip)   n_dc++;
    if (stat_computed)  n_comp++;
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("WATCHDOG expired: %0d of %0d blocks out", ob, NALL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  initial begin
    int kind, mode, prev;
    in_valid = 1'b0;
    in_mode  = MODE_MPEG2;
    for (int l = 0; l < 4; l++) in_data[l] = '0;
    prev = -1;
    for (int b = 0; b < NBLK; b++) begin
      mode = (b < 6) ? b % 3 : int'($urandom % 3);
      kind = (b < 15) ? b / 3 : int'($urandom % 5);
      make_block(b, mode, kind);
      if (mode != prev && prev >= 0) n_switch++;
      prev = mode;
      n_mode[mode] += (kind >= 2) ? 1 : 0;
    end
    for (int b = NBLK; b < NALL; b++)
      make_block(b, (b < NBLK + NMB) ? 0 : (b < NBLK + 2 * NMB) ? 1 : 2, 2);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      send_block(b);
      if ($urandom % 4 == 0) repeat ($urandom % 20) @(posedge clk);
    end
    // wait for the mixed stream to drain, then time one macroblock
    while (ob < NBLK) @(posedge clk);
    throttle = 1'b0;
    for (int m = 0; m < 3; m++) begin
      int b0, b1;
      b0 = (m == 0) ? NBLK : (m == 1) ? NBLK + NMB : NBLK + 2 * NMB;
      b1 = (m == 0) ? NBLK + NMB : (m == 1) ? NBLK + 2 * NMB : NALL;
      repeat (4) @(posedge clk);
      mb_first_cycle = cycle;
      for (int b = b0; b < b1; b++) send_block(b);
      while (ob < b1) @(posedge clk);
      mb_cycles[m] = mb_last_cycle - mb_first_cycle;
    end
    repeat (5) @(posedge clk);

    $display("blocks: zero-skip %0d dc-skip %0d computed %0d (mpeg2 %0d hp %0d bl %0d)",
             n_zero, n_dc, n_comp, n_mode[0], n_mode[1], n_mode[2]);
    $display("mode switches %0d, output back-pressure cycles %0d, input stall cycles %0d, saturated outputs %0d",
             n_switch, n_bp, n_stall, n_sat);
    $display("4:2:0 macroblock, cycles from first input to last output row: MPEG-2 (6 blocks) %0d, H.264 high profile (6 blocks) %0d, H.264 baseline (24 blocks) %0d",
             mb_cycles[0], mb_cycles[1], mb_cycles[2]);
    checks++; if (ob != NALL) failures++;
    checks++; if (n_zero == 0)  begin failures++; $display("zero bypass never happened"); end
    checks++; if (n_dc == 0)    begin failures++; $display("DC bypass never happened"); end
    checks++; if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0) begin failures++; $display("a mode was never computed"); end
    checks++; if (n_comp + n_zero + n_dc != NALL) begin failures++; $display("block event count wrong"); end
    checks++; if (n_switch == 0) begin failures++; $display("no mode switch"); end
    checks++; if (n_bp == 0)     begin failures++; $display("no back-pressure"); end
    checks++; if (n_stall == 0)  begin failures++; $display("no input stall"); end
    checks++; if (n_sat == 0)    begin failures++; $display("no saturation"); end
    checks++; if (mb_cycles[0] > 400) begin
      failures++; $display("macroblock took more than 400 cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

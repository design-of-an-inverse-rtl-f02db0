// idct_input_buffer_tb: writes blocks of all three modes (16 beats for 8x8,
// 4 for 4x4) with a stand-in detector input, and reads every column of each
// stored block back: lanes 0..3 must hold rows 0..3, lanes 4..7 rows 4..7
// in the 8x8 modes and zero in the 4x4 mode. Checks the stored mode and
// flags, that in_ready falls when both banks are full (the writer then
// stalls) and that banks are released in order.
module idct_input_buffer_tb;
  import idct_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts
  always #50 clk = ~clk;

  logic                   in_valid, in_ready, fire, first, avail, blk_zero, blk_dc_only, release_bank;
  idct_mode_e             in_mode, blk_mode;
  logic signed [IN_W-1:0] in_data [4];
  logic signed [IN_W-1:0] blk_dc;
  logic [2:0]             rd_col;
  logic signed [IN_W-1:0] rd_data [8];
  logic                   det_zero, det_dc_only;
  logic signed [IN_W-1:0] det_dc;

  idct_input_buffer u_dut (.clk, .rst_n, .in_valid, .in_ready, .in_mode, .in_data, .fire, .first,
                           .det_zero, .det_dc_only, .det_dc, .avail, .blk_mode, .blk_zero,
                           .blk_dc_only, .blk_dc, .rd_col, .rd_data, .release_bank);

  localparam int NB = 40;
  int bm [NB];
  int bx [NB][8][8];
  int rd_blk = 0, n_stall = 0, n_first = 0;

  // stand-in detector: a tag derived from the block number, seen at the last beat
  int wr_blk = 0;
  assign det_zero    = wr_blk[0];
  assign det_dc_only = wr_blk[1];
  assign det_dc      = IN_W'(wr_blk * 3);

  always @(posedge clk) if (fire && first) n_first++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader
  initial begin
    release_bank = 1'b0; rd_col = '0;
    wait (rst_n);
    while (rd_blk < NB) begin
      @(negedge clk);
      release_bank = 1'b0;
      if (avail && ($urandom % 4 == 0)) begin
        checks += 4;
        if (blk_mode != idct_mode_e'(bm[rd_blk])) failures++;
        if (blk_zero != rd_blk[0]) failures++;
        if (blk_dc_only != rd_blk[1]) failures++;
        if (int'(blk_dc) != rd_blk * 3) failures++;
        for (int c = 0; c < 8; c++) begin
          rd_col = 3'(c);
          #1;
          for (int r = 0; r < 8; r++) begin
            automatic int e = (bm[rd_blk] == 2) ? ((r < 4 && c < 4) ? bx[rd_blk][r][c] : 0) : bx[rd_blk][r][c];
            if (bm[rd_blk] == 2 && c >= 4) continue;   // columns 4..7 unused in 4x4 mode
            checks++;
            if (int'(rd_data[r]) != e) begin
              failures++;
              if (failures < 10) $display("block %0d col %0d lane %0d: %0d exp %0d", rd_blk, c, r, rd_data[r], e);
            end
          end
        end
        release_bank = 1'b1;
        rd_blk++;
      end
    end
    @(negedge clk);
    release_bank = 1'b0;
  end

  initial begin
    in_valid = 1'b0; in_mode = MODE_MPEG2;
    for (int l = 0; l < 4; l++) in_data[l] = '0;
    for (int b = 0; b < NB; b++) begin
      bm[b] = $urandom % 3;
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++)
        bx[b][r][c] = (bm[b] == 2 && (r >= 4 || c >= 4)) ? 0 : int'($urandom % 65536) - 32768;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NB; b++) begin
      automatic int beats = (bm[b] == 2) ? 4 : 16;
      wr_blk = b;
      for (int t = 0; t < beats; t++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_mode  = idct_mode_e'((t == 0) ? bm[b] : $urandom % 3);  // mode only counts on beat 0
        for (int l = 0; l < 4; l++)
          in_data[l] = (bm[b] == 2) ? IN_W'(bx[b][t][l]) : IN_W'(bx[b][t/2][4*(t%2)+l]);
        while (!in_ready) begin n_stall++; @(negedge clk); end
      end
      @(posedge clk);
      #1 in_valid = 1'b0;
    end
    while (rd_blk < NB) @(negedge clk);
    checks += 2;
    if (n_stall == 0) begin failures++; $display("writer never stalled"); end
    if (n_first != NB) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

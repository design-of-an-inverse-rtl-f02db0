// idct_ctrl_tb: runs the sequencer against simple models of its
// surroundings (an input buffer queue of blocks with flags, two arrays that
// are ready every 8 cycles and busy for 12, a butterfly busy for 2 more
// cycles, a FIFO that grants space at random). Per block it counts and
// checks: 16 column loads (4 per half, halves 0 and 1, the right source
// columns) and 4 array starts for 8x8 blocks, 8 loads and 2 starts for 4x4
// blocks, pass 0 from the input buffer and pass 1 from the transpose memory,
// one release per block, and the drain: 8 or 4 row pushes with last on the
// final row, from the bypass value for zero/DC blocks. Bypassed blocks must
// start no array.
module idct_ctrl_tb;
  import idct_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts
  always #5 clk = ~clk;

  logic                    ib_avail, ib_zero, ib_dc_only, ib_release;
  idct_mode_e              ib_mode, cur_mode;
  logic signed [OUT_W-1:0] skip_value, fifo_skip_value;
  logic [2:0]              src_col, rb_col;
  logic                    src_is_tm, sep_load, mm_ready, mm_busy, comb_busy, mm_start;
  logic [1:0]              sep_j;
  mm_tag_t                 mm_tag;
  logic [3:0]              fifo_req_rows;
  logic                    fifo_space_ok, fifo_push, fifo_push_last, fifo_from_skip, fifo_8x8;
  logic                    evt_zero_skip, evt_dc_skip, evt_computed;

  idct_ctrl u_dut (.*);

  localparam int NB = 40;
  int bmode [NB], bkind [NB];          // kind 0 zero, 1 dc, 2 computed
  int head = 0;                        // block at the input buffer's read side
  int loads [NB], starts [NB], pushes [NB], rel [NB];
  int cur = 0;                         // block being computed (loads/starts)
  int drn = 0, drn_rows = 0;           // block being drained

  assign ib_avail   = (head < NB);
  assign ib_mode    = idct_mode_e'(bmode[(head < NB) ? head : 0]);
  assign ib_zero    = (head < NB) && bkind[head] == 0;
  assign ib_dc_only = (head < NB) && bkind[head] == 1;
  assign skip_value = OUT_W'(100 + head);

  // array model: ready every 8 cycles, busy 12, butterfly 2 more
  int mm_cnt = 100, since_start = 100;
  assign mm_ready  = (since_start >= 7);
  assign mm_busy   = (since_start < 12);
  assign comb_busy = (since_start >= 12 && since_start < 14);

  always @(posedge clk) begin
    fifo_space_ok <= ($urandom % 3 != 0);
    since_start <= mm_start ? 0 : since_start + 1;
  end

  // checker
  int exp_col;
  always @(posedge clk) if (rst_n) begin
    if (sep_load) begin
      // the block being computed is the first not yet fully started
      exp_col = is_8x8(cur_mode) ? 4 * (loads[cur] % 8 >= 4) + (loads[cur] % 4) : loads[cur] % 4;
      checks += 3;
      if (int'(src_col) != exp_col) begin failures++; $display("block %0d load %0d: col %0d exp %0d", cur, loads[cur], src_col, exp_col); end
      if (src_is_tm != (loads[cur] >= (is_8x8(cur_mode) ? 8 : 4))) failures++;
      if (int'(sep_j) != loads[cur] % 4) failures++;
      loads[cur]++;
    end
    if (mm_start) begin
      checks += 2;
      if (mm_tag.mode != idct_mode_e'(bmode[cur])) failures++;
      if (mm_tag.pass != (starts[cur] >= (is_8x8(cur_mode) ? 2 : 1))) failures++;
      starts[cur]++;
    end
    if (evt_computed) begin
      checks += 2;
      if (loads[cur] != (bmode[cur] == 2 ? 8 : 16)) begin failures++; $display("block %0d loads %0d", cur, loads[cur]); end
      if (starts[cur] != (bmode[cur] == 2 ? 2 : 4)) begin failures++; $display("block %0d starts %0d", cur, starts[cur]); end
      cur++;
      while (cur < NB && bkind[cur] != 2) cur++;
    end
    if (ib_release) begin
      rel[head]++;
      head <= head + 1;
    end
    if (fifo_push) begin
      checks += 3;
      if (fifo_from_skip != (bkind[drn] != 2)) failures++;
      if (fifo_from_skip && fifo_skip_value != OUT_W'(100 + drn)) failures++;
      if (int'(rb_col) != drn_rows) failures++;
      drn_rows++;
      checks++;
      if (fifo_push_last != (drn_rows == (bmode[drn] == 2 ? 4 : 8))) failures++;
      if (fifo_push_last) begin
        pushes[drn] = drn_rows;
        drn_rows = 0;
        drn++;
      end
    end
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      bmode[b] = $urandom % 3;
      bkind[b] = (b < 6) ? b % 3 : ($urandom % 5 < 3 ? 2 : $urandom % 2);
      loads[b] = 0; starts[b] = 0; pushes[b] = 0; rel[b] = 0;
    end
    while (cur < NB && bkind[cur] != 2) cur++;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (drn < NB) @(negedge clk);
    for (int b = 0; b < NB; b++) begin
      checks += 3;
      if (rel[b] != 1) failures++;
      if (pushes[b] != (bmode[b] == 2 ? 4 : 8)) failures++;
      if (bkind[b] != 2 && starts[b] != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

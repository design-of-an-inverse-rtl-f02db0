// idct_top: hardware-shared 2-D inverse transform core for MPEG-2 (8x8 IDCT),
// H.264/AVC high profile (8x8 integer transform) and H.264/AVC baseline
// (4x4 integer transform).
//
// Data path: input buffer -> separation (8-point columns into even and odd
// 4-point halves) -> two 4x4 systolic matrix-multiplication arrays with
// shift-add (modified CSD) coefficient multipliers -> butterfly combination
// and rounding -> transpose memory -> the same separation/arrays/butterfly
// again for the second 1-D pass -> result buffer -> output FIFO. All-zero
// and DC-only blocks bypass the arrays; the FIFO keeps every block in order.
//
// Input: a valid/ready stream of four signed 16-bit coefficients per beat,
// row by row (16 beats per 8x8 block, 4 per 4x4 block), in_mode taken with a
// block's first beat. Output: a valid/ready stream of result rows, eight
// signed 16-bit values (lanes 4..7 zero for 4x4 blocks), out_last on a
// block's last row. MPEG-2 results are clipped to [-256, 255]; H.264 results
// are the residuals after the standard's final (x + 32) >> 6, computed from
// exact matrix products (the standards' butterflies truncate some odd terms
// with >> 1 and >> 2, so the last bit can differ from a conforming decoder).
// A computed 8x8 block occupies the arrays for about 60 cycles (two passes of
// two halves); its output rows drain while the next block's first pass runs.
// The stat_* outputs pulse once per block: bypassed as all-zero, bypassed as
// DC-only, or computed.
//
// The datapath follows the published hardware-shared IDCT architecture: one
// pair of 4x4 systolic arrays for three standards, modified-CSD multipliers,
// zero/DC bypass and a reordering FIFO. Own choices: the handshakes, widths,
// rounding, FIFO depth, asynchronous active-low reset, and running 4x4 blocks
// on the even array only. The lock-step assertion compares the two arrays;
// both are cleared by reset, so it needs no reset qualifier.
module idct_top
  import idct_pkg::*;
#(
  parameter int RECODE     = REC_MCSD,
  parameter int FIFO_DEPTH = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  idct_mode_e              in_mode,
  input  logic signed [IN_W-1:0]  in_data [4],
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [OUT_W-1:0] out_data [8],
  output logic                    out_last,
  output logic                    stat_zero_skip,
  output logic                    stat_dc_skip,
  output logic                    stat_computed
);

  // ---------------- input buffer and zero/DC detection ----------------
  logic                   ib_fire, ib_first;
  logic                   det_zero, det_dc_only;
  logic signed [IN_W-1:0] det_dc;
  logic                   ib_avail, ib_zero, ib_dc_only, ib_release;
  idct_mode_e             ib_mode;
  logic signed [IN_W-1:0] ib_dc;
  logic signed [IN_W-1:0] ib_rd [8];

  logic [2:0]             src_col;
  logic                   src_is_tm;

  idct_zero_dc_detect u_det (
    .clk, .rst_n, .fire(ib_fire), .first(ib_first), .data(in_data),
    .zero(det_zero), .dc_only(det_dc_only), .dc(det_dc)
  );

  idct_input_buffer u_ibuf (
    .clk, .rst_n, .in_valid, .in_ready, .in_mode, .in_data,
    .fire(ib_fire), .first(ib_first),
    .det_zero, .det_dc_only, .det_dc,
    .avail(ib_avail), .blk_mode(ib_mode), .blk_zero(ib_zero),
    .blk_dc_only(ib_dc_only), .blk_dc(ib_dc),
    .rd_col(src_col), .rd_data(ib_rd), .release_bank(ib_release)
  );

  logic signed [OUT_W-1:0] skip_value;

  idct_dc_skip u_skip (
    .mode(ib_mode), .zero(ib_zero), .dc(ib_dc), .value(skip_value)
  );

  // ---------------- controller ----------------
  idct_mode_e              cur_mode;
  logic                    sep_load;
  logic [1:0]              sep_j;
  logic                    mm_ready_e, mm_ready_o, mm_busy_e, mm_busy_o, comb_busy;
  logic                    mm_start;
  mm_tag_t                 mm_tag;
  logic [2:0]              rb_col;
  logic [3:0]              fifo_req_rows;
  logic                    fifo_space_ok, fifo_push, fifo_push_last;
  logic                    fifo_from_skip, fifo_8x8;
  logic signed [OUT_W-1:0] fifo_skip_value;

  idct_ctrl u_ctrl (
    .clk, .rst_n,
    .ib_avail, .ib_mode, .ib_zero, .ib_dc_only, .ib_release, .skip_value,
    .src_col, .src_is_tm,
    .cur_mode, .sep_load, .sep_j,
    .mm_ready(mm_ready_e && mm_ready_o), .mm_busy(mm_busy_e || mm_busy_o), .comb_busy,
    .mm_start, .mm_tag,
    .rb_col, .fifo_req_rows, .fifo_space_ok, .fifo_push, .fifo_push_last,
    .fifo_from_skip, .fifo_8x8, .fifo_skip_value,
    .evt_zero_skip(stat_zero_skip), .evt_dc_skip(stat_dc_skip),
    .evt_computed(stat_computed)
  );

  // ---------------- separation ----------------
  logic signed [DW-1:0] tm_rd [8];
  logic signed [DW-1:0] src_data [8];
  logic signed [DW-1:0] be [4][4];
  logic signed [DW-1:0] bo [4][4];

  always_comb begin
    for (int r = 0; r < 8; r++) src_data[r] = src_is_tm ? tm_rd[r] : DW'(ib_rd[r]);
  end

  idct_separation u_sep (
    .clk, .mode(cur_mode), .load(sep_load), .j(sep_j), .col(src_data), .be, .bo
  );

  // ---------------- the two matrix-multiplication arrays ----------------
  logic                    ev_valid, od_valid;
  mm_tag_t                 ev_tag, od_tag;
  logic [1:0]              ev_i, ev_j1, ev_j2, od_i, od_j1, od_j2;
  logic signed [ACC_W-1:0] ev_c1, ev_c2, od_c1, od_c2;

  idct_matmul4 #(.PART(PART_EVEN), .RECODE(RECODE)) u_mm_even (
    .clk, .rst_n, .start(mm_start), .start_tag(mm_tag), .b(be),
    .ready(mm_ready_e), .busy(mm_busy_e),
    .out_valid(ev_valid), .out_tag(ev_tag), .out_i(ev_i), .out_j1(ev_j1), .out_j2(ev_j2),
    .out_c1(ev_c1), .out_c2(ev_c2)
  );

  idct_matmul4 #(.PART(PART_ODD), .RECODE(RECODE)) u_mm_odd (
    .clk, .rst_n, .start(mm_start), .start_tag(mm_tag), .b(bo),
    .ready(mm_ready_o), .busy(mm_busy_o),
    .out_valid(od_valid), .out_tag(od_tag), .out_i(od_i), .out_j1(od_j1), .out_j2(od_j2),
    .out_c1(od_c1), .out_c2(od_c2)
  );

  // The arrays run in lock step; the odd one's index outputs repeat the even one's.
  // Both are cleared by reset, so the check needs no reset qualifier.
  assert property (@(posedge clk)
                   ev_valid == od_valid &&
                   (!ev_valid || (ev_i == od_i && ev_j1 == od_j1 && ev_j2 == od_j2 && ev_tag == od_tag)));

  // ---------------- butterfly, transpose memory, result buffer ----------------
  logic [3:0]           cb_we;
  logic [2:0]           cb_row [4];
  logic [2:0]           cb_col [4];
  logic signed [DW-1:0] cb_data [4];

  idct_combination u_comb (
    .clk, .rst_n, .in_valid(ev_valid), .in_tag(ev_tag), .in_i(ev_i), .in_j1(ev_j1),
    .in_j2(ev_j2), .g1(ev_c1), .g2(ev_c2), .h1(od_c1), .h2(od_c2),
    .busy(comb_busy), .we(cb_we), .wr_row(cb_row), .wr_col(cb_col), .wr_data(cb_data)
  );

  idct_transpose_mem #(.TRANSPOSE(1'b1), .W(DW)) u_tmem (
    .clk, .we(src_is_tm ? 4'b0000 : cb_we), .wr_row(cb_row), .wr_col(cb_col),
    .wr_data(cb_data), .rd_col(src_col), .rd_data(tm_rd)
  );

  logic signed [OUT_W-1:0] cb_data_o [4];
  logic signed [OUT_W-1:0] rb_rd [8];

  always_comb begin
    for (int p = 0; p < 4; p++) cb_data_o[p] = OUT_W'(cb_data[p]);
  end

  idct_transpose_mem #(.TRANSPOSE(1'b0), .W(OUT_W)) u_rbuf (
    .clk, .we(src_is_tm ? cb_we : 4'b0000), .wr_row(cb_row), .wr_col(cb_col),
    .wr_data(cb_data_o), .rd_col(rb_col), .rd_data(rb_rd)
  );

  // ---------------- output FIFO ----------------
  logic signed [OUT_W-1:0] push_data [8];

  always_comb begin
    for (int l = 0; l < 8; l++) begin
      if (l >= 4 && !fifo_8x8) push_data[l] = '0;
      else                     push_data[l] = fifo_from_skip ? fifo_skip_value : rb_rd[l];
    end
  end

  idct_sync_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .req_rows(fifo_req_rows), .space_ok(fifo_space_ok),
    .push(fifo_push), .push_data, .push_last(fifo_push_last),
    .out_valid, .out_ready, .out_data, .out_last
  );

endmodule

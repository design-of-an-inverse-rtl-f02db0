// idct_ctrl: sequencer of the 2-D transform.
//
// Compute side, one block at a time from the input buffer:
//  * a zero or DC-only block is not multiplied: its flat value (from
//    idct_dc_skip) is handed to the drain side at once and the bank freed;
//  * otherwise pass 0 reads the block from the input buffer and pass 1 from
//    the transpose memory. For each half of the block (two for 8x8, one for
//    4x4) four columns are loaded into the separation registers (one per
//    cycle) and both 4x4 arrays are started together; the second half is
//    loaded while the first is still in the arrays. After the arrays and the
//    butterfly have drained, pass 0 frees the input bank and pass 1 hands
//    the result buffer to the drain side.
// Drain side: waits until the output FIFO has room for the whole block
// (8 or 4 rows), then pushes one row per cycle, either from the result
// buffer or the flat bypass value, flagging the last row. Pass 1 of the next
// block waits until the drain has read the result buffer, so the drain of
// one block overlaps the first pass of the next.
// The evt_* outputs pulse once per block for the three paths.
//
// The order of operations (two 1-D passes, halves of an 8x8 block, bypass,
// FIFO) follows the source architecture; the state machines are this design's
// own, as the source shows no controller.
module idct_ctrl
  import idct_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // input buffer
  input  logic                    ib_avail,
  input  idct_mode_e              ib_mode,
  input  logic                    ib_zero,
  input  logic                    ib_dc_only,
  output logic                    ib_release,
  input  logic signed [OUT_W-1:0] skip_value,
  // source column read (input buffer in pass 0, transpose memory in pass 1)
  output logic [2:0]              src_col,
  output logic                    src_is_tm,
  // separation and arrays
  output idct_mode_e              cur_mode,
  output logic                    sep_load,
  output logic [1:0]              sep_j,
  input  logic                    mm_ready,
  input  logic                    mm_busy,
  input  logic                    comb_busy,
  output logic                    mm_start,
  output mm_tag_t                 mm_tag,
  // drain to the output FIFO
  output logic [2:0]              rb_col,
  output logic [3:0]              fifo_req_rows,
  input  logic                    fifo_space_ok,
  output logic                    fifo_push,
  output logic                    fifo_push_last,
  output logic                    fifo_from_skip,
  output logic                    fifo_8x8,
  output logic signed [OUT_W-1:0] fifo_skip_value,
  // per-block events
  output logic                    evt_zero_skip,
  output logic                    evt_dc_skip,
  output logic                    evt_computed
);

  typedef enum logic [2:0] {C_IDLE, C_LOAD, C_START, C_FLUSH, C_WAIT_RB} cstate_e;
  typedef enum logic [1:0] {D_IDLE, D_SPACE, D_RUN} dstate_e;

  cstate_e    cs;
  dstate_e    ds;
  idct_mode_e mode_r;
  logic       pass_r, half_r;
  logic [1:0] ld_cnt;

  idct_mode_e              d_mode;
  logic                    d_skip;
  logic signed [OUT_W-1:0] d_value;
  logic [2:0]              d_row;

  logic skip_now, drain_free, go_skip, go_compute_done, last_row;

  assign drain_free      = (ds == D_IDLE);
  assign skip_now        = (cs == C_IDLE) && ib_avail && (ib_zero || ib_dc_only);
  assign go_skip         = skip_now && drain_free;
  assign go_compute_done = (cs == C_FLUSH) && !mm_busy && !comb_busy && pass_r;
  assign last_row        = (d_row == (is_8x8(d_mode) ? 3'd7 : 3'd3));

  // ---------------- compute side ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs     <= C_IDLE;
      mode_r <= MODE_MPEG2;
      pass_r <= 1'b0;
      half_r <= 1'b0;
      ld_cnt <= '0;
    end else begin
      case (cs)
        C_IDLE: if (ib_avail && !(ib_zero || ib_dc_only)) begin
          mode_r <= ib_mode;
          pass_r <= 1'b0;
          half_r <= 1'b0;
          ld_cnt <= '0;
          cs     <= C_LOAD;
        end
        C_LOAD: begin
          ld_cnt <= ld_cnt + 2'd1;
          if (ld_cnt == 2'd3) cs <= C_START;
        end
        C_START: if (mm_ready) begin
          if (is_8x8(mode_r) && !half_r) begin
            half_r <= 1'b1;
            ld_cnt <= '0;
            cs     <= C_LOAD;
          end else begin
            cs <= C_FLUSH;
          end
        end
        C_FLUSH: if (!mm_busy && !comb_busy) begin
          if (!pass_r) begin
            pass_r <= 1'b1;
            half_r <= 1'b0;
            ld_cnt <= '0;
            cs     <= C_WAIT_RB;
          end else begin
            cs <= C_IDLE;
          end
        end
        C_WAIT_RB: if (drain_free) cs <= C_LOAD;
        default: cs <= C_IDLE;
      endcase
    end
  end

  assign cur_mode   = mode_r;
  assign sep_load   = (cs == C_LOAD);
  assign sep_j      = ld_cnt;
  assign src_is_tm  = pass_r;
  assign src_col    = is_8x8(mode_r) ? {half_r, ld_cnt} : {1'b0, ld_cnt};
  assign mm_start   = (cs == C_START) && mm_ready;
  assign mm_tag     = '{mode: mode_r, pass: pass_r, half: half_r};
  assign ib_release = go_skip || ((cs == C_FLUSH) && !mm_busy && !comb_busy && !pass_r);

  assign evt_zero_skip = go_skip && ib_zero;
  assign evt_dc_skip   = go_skip && ib_dc_only;
  assign evt_computed  = go_compute_done;

  // ---------------- drain side ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ds      <= D_IDLE;
      d_mode  <= MODE_MPEG2;
      d_skip  <= 1'b0;
      d_value <= '0;
      d_row   <= '0;
    end else begin
      case (ds)
        D_IDLE: begin
          if (go_skip) begin
            ds      <= D_SPACE;
            d_mode  <= ib_mode;
            d_skip  <= 1'b1;
            d_value <= skip_value;
          end else if (go_compute_done) begin
            ds     <= D_SPACE;
            d_mode <= mode_r;
            d_skip <= 1'b0;
          end
          d_row <= '0;
        end
        D_SPACE: if (fifo_space_ok) ds <= D_RUN;
        D_RUN: begin
          d_row <= d_row + 3'd1;
          if (last_row) ds <= D_IDLE;
        end
        default: ds <= D_IDLE;
      endcase
    end
  end

  assign rb_col          = d_row;
  assign fifo_req_rows   = is_8x8(d_mode) ? 4'd8 : 4'd4;
  assign fifo_push       = (ds == D_RUN);
  assign fifo_push_last  = (ds == D_RUN) && last_row;
  assign fifo_from_skip  = d_skip;
  assign fifo_8x8        = is_8x8(d_mode);
  assign fifo_skip_value = d_value;

endmodule

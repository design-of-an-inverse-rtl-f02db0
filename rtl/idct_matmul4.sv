// idct_matmul4: 4x4 matrix product C = A*B on a refined 1-D systolic array.
//
// A is the MODE-selected coefficient matrix of PART (even or odd half), B a
// 4x4 block of data words (b[k][j]: row k, column j). The array has four
// stages of two processing elements. Stage k adds a(i,k)*b(k,j1) and
// a(i,k)*b(k,j2) to the partial sums handed on by stage k-1, so one product
// flows through the array in four cycles and two results leave it per
// cycle. Issue slot t = 0..7 computes output row i = t mod 4 and columns
// j1 = (i + 2*(t/4)) mod 4, j2 = j1 + 1 mod 4, the rotated order in which
// the two elements of a stage share one coefficient.
//
// Interface: pulse start with b, mode and a user tag while ready is high.
// Results appear on out_valid for eight cycles starting four cycles after
// the first issue slot; the last leaves 12 cycles after start. A new
// product may start every eight cycles; each stage keeps its row of B in
// one of two slots (by product parity), so back-to-back products overlap.
// busy is high while any product is still in the array.
//
// The four-stage, two-PE refined array and its 12-cycle product follow the
// source architecture. The issue order, the overlap of two products and the
// ping-pong storage of B are this design's own.
module idct_matmul4
  import idct_pkg::*;
#(
  parameter int PART   = PART_EVEN,
  parameter int RECODE = REC_MCSD
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  mm_tag_t                 start_tag,
  input  logic signed [DW-1:0]    b [4][4],
  output logic                    ready,
  output logic                    busy,
  output logic                    out_valid,
  output mm_tag_t                 out_tag,
  output logic [1:0]              out_i,
  output logic [1:0]              out_j1,
  output logic [1:0]              out_j2,
  output logic signed [ACC_W-1:0] out_c1,
  output logic signed [ACC_W-1:0] out_c2
);

  typedef struct packed {
    logic       valid;
    logic [2:0] t;
    logic       par;
  } token_t;

  // Issue counter
  logic       active;
  logic [2:0] t_cnt;
  logic       par_q;     // parity of the product being issued
  logic signed [DW-1:0] bmem [2][4][4];
  mm_tag_t    tag_mem [2];

  assign ready = !active || (t_cnt == 3'd7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      t_cnt  <= '0;
      par_q  <= 1'b0;
    end else if (start && ready) begin
      active <= 1'b1;
      t_cnt  <= '0;
      par_q  <= ~par_q;
    end else if (active) begin
      if (t_cnt == 3'd7) active <= 1'b0;
      t_cnt <= t_cnt + 3'd1;
    end
  end

  // The slot the next product will use is ~par_q.
  always_ff @(posedge clk) begin
    if (start && ready) begin
      bmem[~par_q]    <= b;
      tag_mem[~par_q] <= start_tag;
    end
  end

  // Token pipeline: tok[0] is the issue slot, tok[k] the slot at stage k.
  token_t tok [5];
  assign tok[0] = '{valid: active, t: t_cnt, par: par_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < 5; k++) tok[k] <= '0;
    end else begin
      for (int k = 1; k < 5; k++) tok[k] <= tok[k-1];
    end
  end

  function automatic logic [1:0] row_of(input logic [1:0] t);
    return t[1:0];
  endfunction
  function automatic logic [1:0] col1_of(input logic [2:0] t);
    return t[1:0] + {t[2], 1'b0};
  endfunction

  logic signed [ACC_W-1:0] acc1 [4];
  logic signed [ACC_W-1:0] acc2 [4];

  for (genvar k = 0; k < 4; k++) begin : g_stage
    logic [1:0]        si, sj1, sj2;
    logic [KIDX_W-1:0] kidx;
    logic              neg;
    idct_mode_e        smode;
    logic signed [DW-1:0] b1, b2;

    assign si   = row_of(tok[k].t[1:0]);
    assign sj1  = col1_of(tok[k].t);
    assign sj2  = sj1 + 2'd1;
    assign smode = tag_mem[tok[k].par].mode;
    assign b1   = bmem[tok[k].par][k][sj1];
    assign b2   = bmem[tok[k].par][k][sj2];

    idct_coef_rom #(.PART(PART)) u_rom (
      .mode(smode), .i(si), .k(2'(k)), .kidx(kidx), .neg(neg)
    );

    idct_pe #(.PART(PART), .K(k), .FIRST(k == 0), .RECODE(RECODE)) u_pe1 (
      .clk(clk), .en(tok[k].valid), .b(b1), .kidx(kidx), .neg(neg),
      .acc_in((k == 0) ? '0 : acc1[(k == 0) ? 0 : k-1]), .acc_out(acc1[k])
    );
    idct_pe #(.PART(PART), .K(k), .FIRST(k == 0), .RECODE(RECODE)) u_pe2 (
      .clk(clk), .en(tok[k].valid), .b(b2), .kidx(kidx), .neg(neg),
      .acc_in((k == 0) ? '0 : acc2[(k == 0) ? 0 : k-1]), .acc_out(acc2[k])
    );
  end

  assign out_valid = tok[4].valid;
  assign out_tag   = tag_mem[tok[4].par];
  assign out_i     = row_of(tok[4].t[1:0]);
  assign out_j1    = col1_of(tok[4].t);
  assign out_j2    = col1_of(tok[4].t) + 2'd1;
  assign out_c1    = acc1[3];
  assign out_c2    = acc2[3];

  assign busy = active || tok[1].valid || tok[2].valid || tok[3].valid || tok[4].valid;

endmodule

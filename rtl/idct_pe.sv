// idct_pe: one processing element of the 1-D systolic array.
//
// acc_out <= acc_in +/- kmag(kidx) * b, registered, when en is high. The
// multiplication is a bank of hard-wired shift-add multipliers (one per
// constant this element can meet in column K of matrix PART, in any mode)
// followed by a multiplexer on kidx; neg turns the addition into a
// subtraction. With FIRST set the element has no accumulation input, as the
// first element of the array is a multiplier only. One cycle latency.
//
// The systolic element with a hard-wired coefficient follows the source
// architecture. Keeping one network per magnitude the element's column can
// meet in any mode, and choosing one through a multiplexer, is this design's
// own way of letting MODE change the coefficients.
module idct_pe
  import idct_pkg::*;
#(
  parameter int PART   = PART_EVEN,
  parameter int K      = 0,
  parameter bit FIRST  = 1'b0,
  parameter int RECODE = REC_MCSD
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic signed [DW-1:0]    b,
  input  logic [KIDX_W-1:0]       kidx,
  input  logic                    neg,
  input  logic signed [ACC_W-1:0] acc_in,
  output logic signed [ACC_W-1:0] acc_out
);

  localparam int PW = DW + KBITS + 1;

  logic signed [PW-1:0] prod [NUM_K];

  for (genvar q = 0; q < NUM_K; q++) begin : g_k
    if (k_used(PART, K, q)) begin : g_mult
      idct_csd_mult #(.COEF(kmag(q)), .RECODE(RECODE), .IW(DW), .OW(PW)) u_mult (
        .x(b), .p(prod[q])
      );
    end else begin : g_none
      assign prod[q] = '0;
    end
  end

  logic signed [ACC_W-1:0] term, base;

  always_comb begin
    term = ACC_W'(prod[kidx]);
    if (neg) term = -term;
    base = FIRST ? '0 : acc_in;
  end

  always_ff @(posedge clk) begin
    if (en) acc_out <= base + term;
  end

endmodule

// idct_zero_dc_detect: finds blocks that need no matrix multiplication.
//
// Watches the coefficient beats written into the input buffer (four
// coefficients per beat, the first beat flagged by first). The (0,0)
// coefficient is lane 0 of the first beat. ac_nz accumulates whether any
// other coefficient is non-zero. The outputs include the current beat, so
// at the last beat of a block they describe the whole block: zero when
// every coefficient is zero, dc_only when only the (0,0) coefficient is
// non-zero, and dc, the (0,0) coefficient. One register bit plus the DC
// word; no latency.
//
// Detecting all-zero and DC-only blocks follows the source architecture;
// detecting them on the fly as the block streams in is this design's own.
module idct_zero_dc_detect
  import idct_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   fire,
  input  logic                   first,
  input  logic signed [IN_W-1:0] data [4],
  output logic                   zero,
  output logic                   dc_only,
  output logic signed [IN_W-1:0] dc
);

  logic                   ac_nz_q;
  logic signed [IN_W-1:0] dc_q;
  logic                   beat_ac_nz;
  logic                   ac_nz;

  always_comb begin
    beat_ac_nz = (data[1] != '0) || (data[2] != '0) || (data[3] != '0) ||
                 (!first && data[0] != '0);
    ac_nz   = (first ? 1'b0 : ac_nz_q) || (fire && beat_ac_nz);
    dc      = (fire && first) ? data[0] : dc_q;
    zero    = !ac_nz && (dc == '0);
    dc_only = !ac_nz && (dc != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ac_nz_q <= 1'b0;
      dc_q    <= '0;
    end else if (fire) begin
      ac_nz_q <= ac_nz;
      dc_q    <= dc;
    end
  end

endmodule

// idct_sync_fifo: output FIFO that brings the bypass path and the computed
// path back into one ordered stream of result rows.
//
// Entries are rows of eight OUT_W-bit results plus a last-row flag. A block
// is 8 rows (8x8 modes) or 4 rows (4x4 mode), so the FIFO holds a variable
// number of blocks; a writer asks for room for a whole block with req_rows
// and starts it only when space_ok is high, so a block, once started, is
// never stalled halfway. Output is a valid/ready stream. DEPTH rows,
// registered storage, first-word fall-through.
//
// A variable-length FIFO that keeps bypassed and computed blocks in step
// follows the source architecture, which gives only its purpose. The row
// width, the depth and the whole-block room test are this design's own.
module idct_sync_fifo
  import idct_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [3:0]              req_rows,
  output logic                    space_ok,
  input  logic                    push,
  input  logic signed [OUT_W-1:0] push_data [8],
  input  logic                    push_last,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [OUT_W-1:0] out_data [8],
  output logic                    out_last
);

  localparam int AW = $clog2(DEPTH);

  logic signed [OUT_W-1:0] mem  [DEPTH][8];
  logic                    lmem [DEPTH];
  logic [AW-1:0]           wp, rp;
  logic [AW:0]             count;
  logic                    pop, do_push;

  assign pop      = out_valid && out_ready;
  assign do_push  = push && (count < (AW+1)'(DEPTH));
  assign space_ok = ((AW+1)'(DEPTH) - count) >= (AW+1)'(req_rows);
  assign out_valid = (count != '0);
  assign out_data  = mem[rp];
  assign out_last  = lmem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)     rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) begin
      mem[wp]  <= push_data;
      lmem[wp] <= push_last;
    end
  end

endmodule

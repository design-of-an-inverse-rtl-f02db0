// idct_transpose_mem: 8x8 register memory between and after the 1-D passes.
//
// Up to four words are written per cycle at (row, col). With TRANSPOSE set a
// word is stored at [col][row], so that reading column c afterwards returns
// row c of what was written: the first pass's column results are read back
// as rows by the second pass. Without it the word is stored at [row][col],
// and reading column c of the second pass's results returns output row c.
// The read port returns one column (eight lanes) combinationally.
//
// A transpose stage between the two 1-D passes follows the source
// architecture; its register-array form, its four write ports and its reuse
// as the result buffer are this design's own.
module idct_transpose_mem
  import idct_pkg::*;
#(
  parameter bit TRANSPOSE = 1'b1,
  parameter int W         = DW
) (
  input  logic                clk,
  input  logic [3:0]          we,
  input  logic [2:0]          wr_row [4],
  input  logic [2:0]          wr_col [4],
  input  logic signed [W-1:0] wr_data [4],
  input  logic [2:0]          rd_col,
  output logic signed [W-1:0] rd_data [8]
);

  logic signed [W-1:0] mem [8][8];

  always_ff @(posedge clk) begin
    for (int p = 0; p < 4; p++) begin
      if (we[p]) begin
        if (TRANSPOSE) mem[wr_col[p]][wr_row[p]] <= wr_data[p];
        else           mem[wr_row[p]][wr_col[p]] <= wr_data[p];
      end
    end
  end

  always_comb begin
    for (int r = 0; r < 8; r++) rd_data[r] = mem[r][rd_col];
  end

endmodule

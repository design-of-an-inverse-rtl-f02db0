// idct_separation: splits the columns of an 8x8 block into the data
// matrices of the even and the odd 4x4 products.
//
// One column (eight lanes, lane r = row r) is loaded per cycle with its
// position j (0..3) inside the current half of the block. In 8x8 modes the
// even-indexed rows go to be[m][j] = col[2m] and the odd-indexed rows to
// bo[m][j] = col[2m+1]: because the coefficient matrices of both 8x8
// standards are (anti)symmetric, x(k) and x(7-k) then come from the same
// two 4x4 products. In the 4x4 mode lanes 0..3 go straight to be and bo is
// cleared. The matrices are held in registers; the systolic arrays take a
// copy when they start, so the next half can be loaded while they run.
//
// The even/odd split follows the source architecture. Sending 4x4 blocks
// only to the even array is this design's choice (the source alternates 4x4
// blocks between the two arrays for throughput).
module idct_separation
  import idct_pkg::*;
(
  input  logic                 clk,
  input  idct_mode_e           mode,
  input  logic                 load,
  input  logic [1:0]           j,
  input  logic signed [DW-1:0] col [8],
  output logic signed [DW-1:0] be [4][4],
  output logic signed [DW-1:0] bo [4][4]
);

  always_ff @(posedge clk) begin
    if (load) begin
      for (int m = 0; m < 4; m++) begin
        if (is_8x8(mode)) begin
          be[m][j] <= col[2*m];
          bo[m][j] <= col[2*m+1];
        end else begin
          be[m][j] <= col[m];
          bo[m][j] <= '0;
        end
      end
    end
  end

endmodule

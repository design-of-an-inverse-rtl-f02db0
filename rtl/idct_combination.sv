// idct_combination: butterfly and rounding behind the two 4x4 products.
//
// Takes the matching outputs of the even (g) and odd (h) arrays, which run
// in lock step, for row i and columns j1, j2 of one half of the block. In
// 8x8 modes it forms x(i) = g + h and x(7-i) = g - h for both columns (four
// results per cycle); in the 4x4 mode x(i) = g (two results). A second
// register stage applies the rounding right shift of the pass
// (pass_shift) and saturates: after the first pass to the DW-bit
// intermediate word, after the second to 9 bits [-256, 255] for MPEG-2 and
// to OUT_W bits for H.264. Two cycles from input to the write ports
// (we/row/col/data, four ports); busy is high while either stage holds data.
//
// The add/subtract butterfly and its two-cycle cost follow the source
// architecture. The rounding shifts and the clip and saturation limits are
// this design's own, chosen to match the standards' reference results.
module idct_combination
  import idct_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  mm_tag_t                 in_tag,
  input  logic [1:0]              in_i,
  input  logic [1:0]              in_j1,
  input  logic [1:0]              in_j2,
  input  logic signed [ACC_W-1:0] g1,
  input  logic signed [ACC_W-1:0] g2,
  input  logic signed [ACC_W-1:0] h1,
  input  logic signed [ACC_W-1:0] h2,
  output logic                    busy,
  output logic [3:0]              we,
  output logic [2:0]              wr_row [4],
  output logic [2:0]              wr_col [4],
  output logic signed [DW-1:0]    wr_data [4]
);

  localparam int SW = ACC_W + 1;

  // Stage 1: butterfly
  logic                 s1_valid;
  idct_mode_e           s1_mode;
  logic                 s1_pass;
  logic [3:0]           s1_we;
  logic [2:0]           s1_row [4];
  logic [2:0]           s1_col [4];
  logic signed [SW-1:0] s1_sum [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_we    <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_we    <= in_valid ? (is_8x8(in_tag.mode) ? 4'b1111 : 4'b0011) : 4'b0000;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      s1_mode   <= in_tag.mode;
      s1_pass   <= in_tag.pass;
      s1_row[0] <= {1'b0, in_i};
      s1_row[1] <= {1'b0, in_i};
      s1_row[2] <= 3'd7 - {1'b0, in_i};
      s1_row[3] <= 3'd7 - {1'b0, in_i};
      s1_col[0] <= {in_tag.half && is_8x8(in_tag.mode), in_j1};
      s1_col[1] <= {in_tag.half && is_8x8(in_tag.mode), in_j2};
      s1_col[2] <= {in_tag.half && is_8x8(in_tag.mode), in_j1};
      s1_col[3] <= {in_tag.half && is_8x8(in_tag.mode), in_j2};
      if (is_8x8(in_tag.mode)) begin
        s1_sum[0] <= SW'(g1) + SW'(h1);
        s1_sum[1] <= SW'(g2) + SW'(h2);
        s1_sum[2] <= SW'(g1) - SW'(h1);
        s1_sum[3] <= SW'(g2) - SW'(h2);
      end else begin
        s1_sum[0] <= SW'(g1);
        s1_sum[1] <= SW'(g2);
        s1_sum[2] <= '0;
        s1_sum[3] <= '0;
      end
    end
  end

  // Stage 2: rounding shift and saturation
  function automatic logic signed [DW-1:0] round_sat(input logic signed [SW-1:0] v,
                                                      input idct_mode_e mode, input logic pass);
    int sh;
    logic signed [SW-1:0] r, lo, hi;
    sh = pass_shift(mode, pass);
    r  = (sh == 0) ? v : ((v + (SW'(1) <<< (sh - 1))) >>> sh);
    if (!pass) begin
      hi = SW'((1 <<< (DW - 1)) - 1);
      lo = -SW'(1 <<< (DW - 1));
    end else if (mode == MODE_MPEG2) begin
      hi = SW'(255);
      lo = -SW'(256);
    end else begin
      hi = SW'((1 <<< (OUT_W - 1)) - 1);
      lo = -SW'(1 <<< (OUT_W - 1));
    end
    if (r > hi) r = hi;
    if (r < lo) r = lo;
    return DW'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) we <= '0;
    else        we <= s1_valid ? s1_we : 4'b0000;
  end

  always_ff @(posedge clk) begin
    if (s1_valid) begin
      for (int p = 0; p < 4; p++) begin
        wr_row[p]  <= s1_row[p];
        wr_col[p]  <= s1_col[p];
        wr_data[p] <= round_sat(s1_sum[p], s1_mode, s1_pass);
      end
    end
  end

  assign busy = s1_valid || (we != 4'b0000);

endmodule

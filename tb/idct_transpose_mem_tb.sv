// idct_transpose_mem_tb: writes random 8x8 blocks, four words per cycle in a
// shuffled order, into a transposing and a plain instance, then reads all
// columns back: the transposing one must return row c of the written block
// on column c, the plain one column c. Unwritten-port cycles must not write.
module idct_transpose_mem_tb;
  import idct_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #50 clk = ~clk;

  logic [3:0]           we;
  logic [2:0]           wr_row [4];
  logic [2:0]           wr_col [4];
  logic signed [DW-1:0] wr_data [4];
  logic [2:0]           rd_col;
  logic signed [DW-1:0] rd_t [8];
  logic signed [DW-1:0] rd_p [8];

  idct_transpose_mem #(.TRANSPOSE(1'b1)) u_t (.clk, .we, .wr_row, .wr_col, .wr_data, .rd_col, .rd_data(rd_t));
  idct_transpose_mem #(.TRANSPOSE(1'b0)) u_p (.clk, .we, .wr_row, .wr_col, .wr_data, .rd_col, .rd_data(rd_p));

  int blk [8][8];
  int order [64];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tmp, q;
    we = '0; rd_col = '0;
    for (int p = 0; p < 4; p++) begin wr_row[p] = '0; wr_col[p] = '0; wr_data[p] = '0; end
    for (int rep = 0; rep < 10; rep++) begin
      for (int e = 0; e < 64; e++) begin
        order[e] = e;
        blk[e / 8][e % 8] = $signed($urandom) >>> 8;
      end
      for (int e = 63; e > 0; e--) begin
        q = $urandom % (e + 1); tmp = order[e]; order[e] = order[q]; order[q] = tmp;
      end
      for (int s = 0; s < 16; s++) begin
        @(negedge clk);
        for (int p = 0; p < 4; p++) begin
          we[p] = 1'b1;
          wr_row[p]  = 3'(order[4*s+p] / 8);
          wr_col[p]  = 3'(order[4*s+p] % 8);
          wr_data[p] = DW'(blk[order[4*s+p] / 8][order[4*s+p] % 8]);
        end
        // an idle cycle with garbage on the data lines
        @(negedge clk);
        we = '0;
        for (int p = 0; p < 4; p++) wr_data[p] = DW'($urandom);
      end
      @(negedge clk);
      for (int c = 0; c < 8; c++) begin
        rd_col = 3'(c);
        #1;
        for (int r = 0; r < 8; r++) begin
          checks += 2;
          if (int'(rd_t[r]) != blk[c][r]) failures++;
          if (int'(rd_p[r]) != blk[r][c]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

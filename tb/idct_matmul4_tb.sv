// idct_matmul4_tb: drives the even and the odd systolic array with random
// 4x4 data blocks in every mode and compares all 16 results of each product
// with A*B, A built from the standards' matrices (tb/idct_ref.svh). Products
// are started back to back as soon as ready allows, which checks that a new
// product may start every 8 cycles. It also checks the timing: the first
// result 5 cycles and the last 12 cycles after start, two results per cycle.
module idct_matmul4_tb;
  import idct_pkg::*;

  `include "tb/idct_ref.svh"

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts
  always #5 clk = ~clk;

  logic                    start;
  mm_tag_t                 tag;
  logic signed [DW-1:0]    b [4][4];
  logic                    rdy [2], busy [2], ov [2];
  mm_tag_t                 otag [2];
  logic [1:0]              oi [2], oj1 [2], oj2 [2];
  logic signed [ACC_W-1:0] c1 [2], c2 [2];

  for (genvar p = 0; p < 2; p++) begin : g_p
    idct_matmul4 #(.PART(p)) u_dut (
      .clk, .rst_n, .start, .start_tag(tag), .b, .ready(rdy[p]), .busy(busy[p]),
      .out_valid(ov[p]), .out_tag(otag[p]), .out_i(oi[p]), .out_j1(oj1[p]), .out_j2(oj2[p]),
      .out_c1(c1[p]), .out_c2(c2[p]));
  end

  localparam int NOPS = 30;
  int  op_mode [NOPS];
  int  op_b    [NOPS][4][4];
  int  op_start_cycle [NOPS];
  int  seen [NOPS][2];
  int  cycle = 0;
  int  out_op = 0, out_cnt = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic longint acoef(input int mode, input int part, input int i, input int k);
    if (mode == 2) return (part == 0) ? ref_m(2, i, k) : 0;
    return ref_m(mode, i, 2 * k + part);
  endfunction

  // checker: outputs of op n arrive in order; the tag's half bit carries n's parity
  always @(negedge clk) begin
    if (rst_n && ov[0]) begin
      for (int p = 0; p < 2; p++) begin
        longint e1, e2;
        e1 = 0; e2 = 0;
        for (int k = 0; k < 4; k++) begin
          e1 += acoef(op_mode[out_op], p, int'(oi[p]), k) * op_b[out_op][k][oj1[p]];
          e2 += acoef(op_mode[out_op], p, int'(oi[p]), k) * op_b[out_op][k][oj2[p]];
        end
        checks += 2;
        if (longint'(c1[p]) != e1 || longint'(c2[p]) != e2) begin
          failures++;
          if (failures < 10) $display("op %0d part %0d i %0d j %0d/%0d: %0d %0d exp %0d %0d",
                                      out_op, p, oi[p], oj1[p], oj2[p], c1[p], c2[p], e1, e2);
        end
        seen[out_op][p] = seen[out_op][p] | (1 << (4 * oi[p] + oj1[p])) | (1 << (4 * oi[p] + oj2[p]));
      end
      checks++;
      if (otag[0].mode != idct_mode_e'(op_mode[out_op])) failures++;
      if (out_cnt == 0) begin
        checks++;
        if (cycle - op_start_cycle[out_op] != 5) begin
          failures++; $display("first result after %0d cycles", cycle - op_start_cycle[out_op]);
        end
      end
      if (out_cnt == 7) begin
        checks++;
        if (cycle - op_start_cycle[out_op] != 12) begin
          failures++; $display("last result after %0d cycles", cycle - op_start_cycle[out_op]);
        end
        for (int p = 0; p < 2; p++) begin
          checks++;
          if (seen[out_op][p] != 32'hffff) begin failures++; $display("op %0d missing results", out_op); end
        end
        out_cnt = 0;
        out_op++;
      end else out_cnt++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0;
    tag   = '{mode: MODE_MPEG2, pass: 1'b0, half: 1'b0};
    for (int k = 0; k < 4; k++) for (int j = 0; j < 4; j++) b[k][j] = '0;
    for (int n = 0; n < NOPS; n++) begin
      op_mode[n] = n % 3;
      seen[n] = '{0, 0};
      for (int k = 0; k < 4; k++) for (int j = 0; j < 4; j++)
        op_b[n][k][j] = (n < 3) ? ((k + j) % 2 != 0 ? -(1 << 23) : (1 << 23) - 1) : $signed($urandom) >>> 8;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < NOPS; n++) begin
      while (!rdy[0]) @(negedge clk);
      start = 1'b1;
      tag   = '{mode: idct_mode_e'(op_mode[n]), pass: 1'b0, half: 1'b0};
      for (int k = 0; k < 4; k++) for (int j = 0; j < 4; j++) b[k][j] = DW'(op_b[n][k][j]);
      op_start_cycle[n] = cycle;
      @(negedge clk);
      start = 1'b0;
      if (n == 10) repeat (20) @(negedge clk);   // also an idle gap
    end
    while (out_op < NOPS) @(negedge clk);
    checks++;
    if (busy[0] || busy[1]) repeat (2) @(negedge clk);
    if (busy[0] || busy[1]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

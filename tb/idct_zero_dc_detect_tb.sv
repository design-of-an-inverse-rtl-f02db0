// idct_zero_dc_detect_tb: streams 8x8 (16-beat) and 4x4 (4-beat) blocks of
// four kinds (all zero, DC only, one AC coefficient, dense) through the
// detector and checks zero, dc_only and dc at the last beat of every block
// against a count made by the testbench.
module idct_zero_dc_detect_tb;
  import idct_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts
  always #5 clk = ~clk;

  logic                   fire, first, zero, dc_only;
  logic signed [IN_W-1:0] data [4];
  logic signed [IN_W-1:0] dc;

  idct_zero_dc_detect u_dut (.clk, .rst_n, .fire, .first, .data, .zero, .dc_only, .dc);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int beats, kind, nz_ac, vdc, pos;
    int blk [64];
    fire = 1'b0; first = 1'b0;
    for (int l = 0; l < 4; l++) data[l] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      beats = (n % 2 != 0) ? 16 : 4;
      kind  = (n / 2) % 4;
      for (int e = 0; e < 64; e++) blk[e] = 0;
      case (kind)
        0: ;
        1: blk[0] = ($urandom % 2 != 0) ? -1 - int'($urandom % 2000) : 1 + int'($urandom % 2000);
        2: begin
          pos = 1 + int'($urandom % (4 * beats - 1));
          blk[pos] = ($urandom % 2 != 0) ? -1 : 1;
          blk[0] = $urandom % 3;
        end
        default: for (int e = 0; e < 4 * beats; e++) blk[e] = int'($urandom % 7) - 3;
      endcase
      nz_ac = 0;
      for (int e = 1; e < 4 * beats; e++) if (blk[e] != 0) nz_ac = 1;
      vdc = blk[0];
      for (int t = 0; t < beats; t++) begin
        @(negedge clk);
        fire = 1'b1; first = (t == 0);
        for (int l = 0; l < 4; l++) data[l] = IN_W'(blk[4 * t + l]);
        if ($urandom % 3 == 0) begin
          // a cycle without a beat in the middle of the block
          fire = 1'b0;
          for (int l = 0; l < 4; l++) data[l] = IN_W'($urandom);
          @(negedge clk);
          fire = 1'b1;
          for (int l = 0; l < 4; l++) data[l] = IN_W'(blk[4 * t + l]);
        end
      end
      #1;
      checks += 3;
      if (zero != (nz_ac == 0 && vdc == 0)) begin failures++; $display("zero wrong, block %0d kind %0d", n, kind); end
      if (dc_only != (nz_ac == 0 && vdc != 0)) begin failures++; $display("dc_only wrong, block %0d kind %0d", n, kind); end
      if (int'(dc) != vdc) begin failures++; $display("dc wrong, block %0d", n); end
    end
    @(negedge clk);
    fire = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// idct_sync_fifo_tb: pushes blocks of 8 and 4 rows, each started only when
// space_ok grants room for the whole block, against a randomly stalling
// reader, and checks that rows and last flags come out in order, that
// space_ok never admits a block that would overflow, that a full FIFO
// refuses a block and that it drains to empty.
module idct_sync_fifo_tb;
  import idct_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts
  always #5 clk = ~clk;

  localparam int DEPTH = 16;
  logic [3:0]              req_rows;
  logic                    space_ok, push, push_last, out_valid, out_ready, out_last;
  logic signed [OUT_W-1:0] push_data [8];
  logic signed [OUT_W-1:0] out_data [8];

  idct_sync_fifo #(.DEPTH(DEPTH)) u_dut (.clk, .rst_n, .req_rows, .space_ok, .push, .push_data,
                                         .push_last, .out_valid, .out_ready, .out_data, .out_last);

  int sent = 0, got = 0, occ = 0, n_refused = 0;
  int q_val [$];
  bit q_last [$];
  bit stall_reader = 1'b0;

  always @(negedge clk) out_ready = !stall_reader && ($urandom % 3 != 0);

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks += 2;
      if (q_val.size() == 0) begin failures++; end
      else begin
        automatic int e = q_val.pop_front();
        automatic bit el = q_last.pop_front();
        for (int l = 0; l < 8; l++) if (int'(out_data[l]) != e + l) begin failures++; break; end
        if (out_last != el) failures++;
      end
      got++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rows, base;
    push = 1'b0; push_last = 1'b0; req_rows = 4'd8;
    for (int l = 0; l < 8; l++) push_data[l] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 200; b++) begin
      rows = ($urandom % 2 != 0) ? 8 : 4;
      stall_reader = (b % 40 < 6);       // let the FIFO fill up now and then
      @(negedge clk);
      req_rows = 4'(rows);
      #1;
      while (!space_ok) begin
        n_refused++;
        checks++;
        if (DEPTH - int'(u_dut.count) >= rows) failures++;   // refused although room
        stall_reader = 1'b0;
        @(negedge clk);
        #1;
      end
      checks++;
      if (DEPTH - int'(u_dut.count) < rows) failures++;      // admitted without room
      for (int r = 0; r < rows; r++) begin
        if (r > 0) @(negedge clk);
        base = int'($urandom % 1000);
        push = 1'b1; push_last = (r == rows - 1);
        for (int l = 0; l < 8; l++) push_data[l] = OUT_W'(base + l);
        q_val.push_back(base); q_last.push_back(r == rows - 1);
        sent++;
      end
      @(negedge clk);
      push = 1'b0;
    end
    stall_reader = 1'b0;
    while (got < sent) @(negedge clk);
    checks += 2;
    if (out_valid) failures++;
    if (n_refused == 0) begin failures++; $display("FIFO never refused a block"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// idct_ieee1180_tb: IEEE 1180-style accuracy test of the MPEG-2 mode.
//
// For each of the three input ranges [-256,255], [-5,5] and [-300,300],
// NPAT random 8x8 pixel blocks are drawn, transformed with a double-precision
// forward DCT, rounded and clipped to 12-bit coefficients, and sent through
// the core. Each output is compared with the double-precision IDCT of the
// same coefficients (rounded, clipped to [-256,255]). The statistics are
// checked against the limits: peak error <= 1, peak mean square error
// <= 0.06, overall mean square error <= 0.02, peak mean error <= 0.015,
// overall mean error <= 0.0015. Random numbers come from $urandom, not
// from the generator the standard prescribes, and the sign-inverted second
// run of the standard is not made.
module idct_ieee1180_tb;
  import idct_pkg::*;

  localparam int NPAT = 10000;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts
  always #5 clk = ~clk;

  logic                    in_valid, in_ready, out_valid, out_ready, out_last;
  idct_mode_e              in_mode;
  logic signed [IN_W-1:0]  in_data [4];
  logic signed [OUT_W-1:0] out_data [8];
  logic                    stat_zero_skip, stat_dc_skip, stat_computed;

  idct_top dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_mode, .in_data,
    .out_valid, .out_ready, .out_data, .out_last,
    .stat_zero_skip, .stat_dc_skip, .stat_computed
  );

  int checks = 0, failures = 0;
  real cosv [8][8];

  // expected rows, in block order
  int exp_q [$];

  // per-range statistics
  longint sum_err [8][8];
  longint sum_sq  [8][8];
  int     peak_err;
  int     n_out_blocks = 0, orow = 0;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fdct(input int f [8][8], output int c [8][8]);
    real s, cu, cv;
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        s = 0.0;
        for (int x = 0; x < 8; x++)
          for (int y = 0; y < 8; y++) s += f[x][y] * cosv[x][u] * cosv[y][v];
        cu = (u == 0) ? 0.70710678118654752440 : 1.0;
        cv = (v == 0) ? 0.70710678118654752440 : 1.0;
        s = s * cu * cv / 4.0;
        c[u][v] = int'($floor(s + 0.5));
        if (c[u][v] > 2047) c[u][v] = 2047;
        if (c[u][v] < -2048) c[u][v] = -2048;
      end
  endtask

  task automatic idct_real(input int c [8][8], output int f [8][8]);
    real s, cu, cv;
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++) begin
        s = 0.0;
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++) begin
            cu = (u == 0) ? 0.70710678118654752440 : 1.0;
            cv = (v == 0) ? 0.70710678118654752440 : 1.0;
            s += cu * cv * c[u][v] * cosv[x][u] * cosv[y][v];
          end
        s = s / 4.0;
        f[x][y] = int'($floor(s + 0.5));
        if (f[x][y] > 255) f[x][y] = 255;
        if (f[x][y] < -256) f[x][y] = -256;
      end
  endtask

  // output side: accumulate the error statistics
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      for (int l = 0; l < 8; l++) begin
        automatic int e = exp_q.pop_front();
        automatic int d = int'(out_data[l]) - e;
        sum_err[orow][l] += longint'(d);
        sum_sq[orow][l]  += longint'(d * d);
        if (d > peak_err) peak_err = d;
        if (-d > peak_err) peak_err = -d;
      end
      if (orow == 7) begin orow = 0; n_out_blocks++; end
      else orow++;
    end
  end

  initial begin
    automatic int lo [3] = '{-256, -5, -300};
    automatic int hi [3] = '{255, 5, 300};
    int pix [8][8];
    int coef [8][8];
    int ref_f [8][8];
    real pmse, pme, omse, ome, v;
    for (int x = 0; x < 8; x++)
      for (int u = 0; u < 8; u++) cosv[x][u] = $cos((2.0 * x + 1.0) * u * PI / 16.0);
    in_valid = 1'b0;
    in_mode  = MODE_MPEG2;
    out_ready = 1'b1;
    for (int l = 0; l < 4; l++) in_data[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int rg = 0; rg < 3; rg++) begin
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin sum_err[r][c] = 0; sum_sq[r][c] = 0; end
      peak_err = 0;
      n_out_blocks = 0;
      for (int n = 0; n < NPAT; n++) begin
        for (int x = 0; x < 8; x++) for (int y = 0; y < 8; y++)
          pix[x][y] = lo[rg] + int'($urandom % (hi[rg] - lo[rg] + 1));
        fdct(pix, coef);
        idct_real(coef, ref_f);
        for (int x = 0; x < 8; x++) for (int y = 0; y < 8; y++) exp_q.push_back(ref_f[x][y]);
        for (int t = 0; t < 16; t++) begin
          @(negedge clk);
          in_valid = 1'b1;
          for (int l = 0; l < 4; l++) in_data[l] = IN_W'(coef[t/2][4*(t%2)+l]);
          while (!in_ready) @(negedge clk);
        end
        @(posedge clk);
        #1 in_valid = 1'b0;
      end
      while (n_out_blocks < NPAT) @(negedge clk);
      pmse = 0.0; pme = 0.0; omse = 0.0; ome = 0.0;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          v = real'(sum_sq[r][c]) / NPAT;
          if (v > pmse) pmse = v;
          omse += v / 64.0;
          v = real'(sum_err[r][c]) / NPAT;
          ome += v / 64.0;
          if (v < 0) v = -v;
          if (v > pme) pme = v;
        end
      if (ome < 0) ome = -ome;
      $display("range [%0d,%0d], %0d blocks: PE %0d  PMSE %.5f  OMSE %.5f  PME %.5f  OME %.6f",
               lo[rg], hi[rg], NPAT, peak_err, pmse, omse, pme, ome);
      checks += 5;
      if (peak_err > 1)  begin failures++; $display("peak error above 1"); end
      if (pmse > 0.06)   begin failures++; $display("PMSE above 0.06"); end
      if (omse > 0.02)   begin failures++; $display("OMSE above 0.02"); end
      if (pme > 0.015)   begin failures++; $display("PME above 0.015"); end
      if (ome > 0.0015)  begin failures++; $display("OME above 0.0015"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// idct_pe_tb: checks a processing element (odd part, stage 1, so it holds
// the MPEG-2 and H.264 constants of that column) and a first-stage element
// without accumulation input: acc_out = acc_in +/- kmag(kidx)*b one cycle
// after en, and unchanged while en is low.
module idct_pe_tb;
  import idct_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                    en;
  logic signed [DW-1:0]    b;
  logic [KIDX_W-1:0]       kidx;
  logic                    neg;
  logic signed [ACC_W-1:0] acc_in, acc_a, acc_b;

  idct_pe #(.PART(PART_ODD), .K(1), .FIRST(1'b0)) u_a (
    .clk, .en, .b, .kidx, .neg, .acc_in, .acc_out(acc_a));
  idct_pe #(.PART(PART_EVEN), .K(0), .FIRST(1'b1)) u_b (
    .clk, .en, .b, .kidx, .neg, .acc_in, .acc_out(acc_b));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // magnitudes in column 1 of the odd matrices: D,G,B,E (MPEG-2), 10,3,12,6 (H.264)
  int odd_k1 [8] = '{1, 3, 4, 6, 8, 9, 10, 11};
  // magnitudes in column 0 of the even matrices: A (MPEG-2), 8 (H.264 8x8), 2 (4x4)
  int even_k0 [3] = '{0, 7, 13};
  longint mags [NUM_K] = '{5792, 8034, 7568, 6811, 4551, 3134, 1598, 8, 12, 10, 6, 3, 4, 2, 1};

  initial begin
    longint ea, eb, hold;
    en = 1'b0; b = '0; kidx = '0; neg = 1'b0; acc_in = '0;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      en     = 1'b1;
      b      = DW'($urandom);
      neg    = 1'($urandom % 2);
      acc_in = ACC_W'($signed({$urandom, $urandom})) >>> 12;
      kidx   = KIDX_W'(odd_k1[$urandom % 8]);
      ea     = longint'(acc_in) + (neg ? -1 : 1) * mags[kidx] * longint'(b);
      @(negedge clk);
      checks++;
      if (longint'(acc_a) != ea) begin
        failures++;
        if (failures < 10) $display("PE kidx %0d neg %0d b %0d: got %0d exp %0d", kidx, neg, b, acc_a, ea);
      end
      kidx = KIDX_W'(even_k0[$urandom % 3]);
      eb   = (neg ? -1 : 1) * mags[kidx] * longint'(b);
      @(negedge clk);
      checks++;
      if (longint'(acc_b) != eb) begin
        failures++;
        if (failures < 10) $display("PE first kidx %0d: got %0d exp %0d", kidx, acc_b, eb);
      end
      // hold while disabled
      hold = longint'(acc_b);
      en = 1'b0; b = DW'($urandom);
      @(negedge clk);
      checks++;
      if (longint'(acc_b) != hold) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

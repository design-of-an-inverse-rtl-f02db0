// idct_dc_skip: output value of a block that skips the multiplication.
//
// A block whose only non-zero coefficient is DC transforms to a flat block;
// an all-zero block to zeros. The value is computed here with the same
// fixed-point steps as the full datapath, so the bypass is bit-exact with it:
//   MPEG-2:  r = (5792*dc + 2^9) >>> 10,  v = clip9((5792*r + 2^17) >>> 18)
//   H.264 8x8: v = (64*dc + 2^11) >>> 12;  H.264 4x4: v = (4*dc + 2^7) >>> 8
// 5792 = cos(pi/4)*2^13 is multiplied by the shift-add network.
// Combinational.
//
// Producing a bypassed block's output without the arrays follows the source
// architecture; making it bit-exact with the datapath is this design's own
// choice, and so is testing the whole block rather than each half.
module idct_dc_skip
  import idct_pkg::*;
(
  input  idct_mode_e              mode,
  input  logic                    zero,
  input  logic signed [IN_W-1:0]  dc,
  output logic signed [OUT_W-1:0] value
);

  localparam int PW = DW + KBITS + 1;

  logic signed [DW-1:0] dc_w, r1;
  logic signed [PW-1:0] p1, p2;

  assign dc_w = DW'(dc);

  idct_csd_mult #(.COEF(5792), .IW(DW), .OW(PW)) u_m1 (.x(dc_w), .p(p1));
  idct_csd_mult #(.COEF(5792), .IW(DW), .OW(PW)) u_m2 (.x(r1),   .p(p2));

  always_comb begin
    logic signed [PW-1:0] v;
    r1 = DW'((p1 + PW'(512)) >>> 10);
    case (mode)
      MODE_MPEG2: begin
        v = (p2 + (PW'(1) <<< 17)) >>> 18;
        if (v > PW'(255))  v = PW'(255);
        if (v < -PW'(256)) v = -PW'(256);
      end
      MODE_H264_HP: v = ((PW'(dc_w) <<< 6) + PW'(2048)) >>> 12;
      default:      v = ((PW'(dc_w) <<< 2) + PW'(128)) >>> 8;
    endcase
    value = zero ? '0 : OUT_W'(v);
  end

endmodule

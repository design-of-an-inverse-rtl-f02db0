// idct_pkg: types, widths and coefficient tables shared by the multi-standard
// IDCT core.
//
// The core runs three transforms on one datapath, chosen per block by the
// two-bit MODE: the MPEG-2 8x8 IDCT (cosine coefficients in 14-bit fixed
// point, scale 2^13, truncated as in the coefficient tables of the design),
// the H.264 high-profile 8x8 integer inverse transform (coefficients 8, 12,
// 10, 6, 4, 3) and the H.264 baseline 4x4 inverse transform (coefficients
// 2 and 1, i.e. the standard matrix scaled by two).
//
// An 8-point 1-D transform x = M*X is split into an even and an odd 4x4
// product: g = E*[X0 X2 X4 X6], h = O*[X1 X3 X5 X7], x(k) = g(k)+h(k),
// x(7-k) = g(k)-h(k). E is matrix PART_EVEN ("sub-module #1"), O is
// PART_ODD ("sub-module #2"). In 4x4 mode the baseline matrix is loaded in
// the even part and the odd part is idle.
//
// Every coefficient is one of NUM_K magnitudes (KMAG) with a sign. A
// processing element multiplies by a magnitude with a hard-wired shift-add
// network, the coefficient recoded as binary, CSD or modified CSD (MCSD,
// the design's choice: a -1 digit only where it lowers the digit count).
//
// The three matrices, the split into even and odd 4x4 products, the 14-bit
// cosine word and the binary/CSD/modified-CSD recodings follow the published
// architecture this core implements. Own choices: the mode encoding, truncating
// the cosines (floor), the baseline matrix scaled by two, the widths DW and
// ACC_W, and the rounding shifts of pass_shift. The width constants are used
// by the modules, not by the package itself, so a lint of the package alone
// lists them as unused.
package idct_pkg;

  typedef enum logic [1:0] {
    MODE_MPEG2   = 2'd0,  // MPEG-2 8x8 IDCT
    MODE_H264_HP = 2'd1,  // H.264/AVC high profile 8x8
    MODE_H264_BL = 2'd2   // H.264/AVC baseline 4x4
  } idct_mode_e;

  typedef enum int {
    REC_BINARY = 0,
    REC_CSD    = 1,
    REC_MCSD   = 2
  } recode_e;

  localparam int PART_EVEN = 0;
  localparam int PART_ODD  = 1;

  localparam int IN_W  = 16;  // coefficient input width (from inverse quantisation)
  localparam int DW    = 24;  // datapath word between the two 1-D passes
  localparam int ACC_W = 42;  // accumulator width inside the systolic array
  localparam int OUT_W = 16;  // residual / pixel output width
  localparam int KBITS = 15;  // digit positions of a coefficient (14 bits + NAF carry)

  // Magnitude table. 0..6: MPEG-2 cosines A,B,C,D,E,F,G = floor(cos(m*pi/16)*2^13)
  // for m = 4,1,2,3,5,6,7; 7..12: H.264 8x8 integers; 13..14: H.264 4x4 (x2).
  localparam int NUM_K = 15;
  localparam int KIDX_W = 4;
  function automatic int kmag(input int idx);
    case (idx)
      0: return 5792;  // A = cos(pi/4)
      1: return 8034;  // B = cos(pi/16)
      2: return 7568;  // C = cos(pi/8)
      3: return 6811;  // D = cos(3pi/16)
      4: return 4551;  // E = cos(5pi/16)
      5: return 3134;  // F = cos(3pi/8)
      6: return 1598;  // G = cos(7pi/16)
      7: return 8;
      8: return 12;
      9: return 10;
      10: return 6;
      11: return 3;
      12: return 4;
      13: return 2;
      14: return 1;
      default: return 0;
    endcase
  endfunction

  function automatic int kindex(input int mag);
    for (int i = 0; i < NUM_K; i++)
      if (kmag(i) == mag) return i;
    return 0;
  endfunction

  // Table index of floor(cos(m*pi/16)*2^13), m = 1..7.
  function automatic int cos_idx(input int m);
    case (m)
      1: return 1;
      2: return 2;
      3: return 3;
      4: return 0;
      5: return 4;
      6: return 5;
      default: return 6;
    endcase
  endfunction

  // Full 8x8 (or 4x4) matrix entry M[k][n] of x = M*X, as a signed integer.
  function automatic int full_coef(input idct_mode_e mode, input int k, input int n);
    int a, m, s;
    case (mode)
      MODE_MPEG2: begin
        if (n == 0) return kmag(0);            // C(0)*cos(0) = cos(pi/4)
        a = ((2 * k + 1) * n) % 32;             // angle in units of pi/16
        if (a <= 8)       begin m = a;      s = 1;  end
        else if (a <= 16) begin m = 16 - a; s = -1; end
        else if (a <= 24) begin m = a - 16; s = -1; end
        else              begin m = 32 - a; s = 1;  end
        return s * kmag(cos_idx(m));
      end
      MODE_H264_HP: begin
        // Column k of the basis matrix T (rows of T are the basis vectors).
        case (n)
          0: return 8;
          1: case (k) 0: return 12; 1: return 10; 2: return 6;  3: return 3;
                      4: return -3; 5: return -6; 6: return -10; default: return -12; endcase
          2: case (k) 0: return 8;  1: return 4;  2: return -4; 3: return -8;
                      4: return -8; 5: return -4; 6: return 4;  default: return 8; endcase
          3: case (k) 0: return 10; 1: return -3; 2: return -12; 3: return -6;
                      4: return 6;  5: return 12; 6: return 3;  default: return -10; endcase
          4: case (k) 0, 3, 4, 7: return 8; default: return -8; endcase
          5: case (k) 0: return 6;  1: return -12; 2: return 3; 3: return 10;
                      4: return -10; 5: return -3; 6: return 12; default: return -6; endcase
          6: case (k) 0: return 4;  1: return -8; 2: return 8;  3: return -4;
                      4: return -4; 5: return 8;  6: return -8; default: return 4; endcase
          default: case (k) 0: return 3; 1: return -6; 2: return 10; 3: return -12;
                      4: return 12; 5: return -10; 6: return 6; default: return -3; endcase
        endcase
      end
      default: begin
        // H.264 4x4 inverse, scaled by 2: x0 = 2d0+2d1+2d2+d3 ...
        case (n)
          0: return 2;
          1: case (k) 0: return 2; 1: return 1; 2: return -1; default: return -2; endcase
          2: case (k) 0, 3: return 2; default: return -2; endcase
          default: case (k) 0: return 1; 1: return -2; 2: return 2; default: return -1; endcase
        endcase
      end
    endcase
  endfunction

  // Entry [i][k] of the 4x4 matrix used by PART (even/odd) in MODE.
  function automatic int part_coef(input idct_mode_e mode, input int part, input int i, input int k);
    if (mode == MODE_H264_BL) return (part == PART_EVEN) ? full_coef(mode, i, k) : 0;
    return full_coef(mode, i, (part == PART_EVEN) ? 2 * k : 2 * k + 1);
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  // True if magnitude idx appears in column k of the PART matrix in any mode:
  // a processing element only builds the shift-add networks it can need.
  function automatic bit k_used(input int part, input int k, input int idx);
    for (int md = 0; md < 3; md++)
      for (int i = 0; i < 4; i++)
        if (part_coef(idct_mode_e'(md), part, i, k) != 0 &&
            iabs(part_coef(idct_mode_e'(md), part, i, k)) == kmag(idx)) return 1'b1;
    return 1'b0;
  endfunction

  // Signed digit (-1, 0, +1) at position pos of c recoded as binary, CSD
  // (non-adjacent form) or modified CSD (a run of ones becomes +1...-1 only
  // when that lowers the number of non-zero digits, i.e. runs of 3 or more).
  function automatic int recode_digit(input int c, input int pos, input int rec);
    int v, d, run;
    int dig [KBITS+2];
    for (int i = 0; i < KBITS + 2; i++) dig[i] = 0;
    v = c;
    if (rec == REC_BINARY) begin
      for (int i = 0; i < KBITS + 2; i++) dig[i] = (v >> i) & 1;
    end else if (rec == REC_CSD) begin
      for (int i = 0; i < KBITS + 2; i++) begin
        if (v % 2 != 0) begin
          d = 2 - (v % 4);
          dig[i] = d;
          v = v - d;
        end
        v = v / 2;
      end
    end else begin
      for (int i = 0; i < KBITS + 2; i++) begin
        if (((v >> i) & 1) != 0 && dig[i] == 0) begin
          run = 0;
          while (i + run < KBITS + 2 && ((v >> (i + run)) & 1) != 0) run++;
          if (run >= 3) begin
            dig[i] = -1;
            v = v + (1 << i);     // clears the run, carries into bit i+run
          end else begin
            for (int r = 0; r < run; r++) dig[i + r] = 1;
          end
        end
      end
    end
    d = 0;
    for (int i = 0; i < KBITS + 2; i++) if (i == pos) d = dig[i];
    return d;
  endfunction

  // Positions whose recoded digit equals d (+1 or -1), as a bit mask.
  function automatic logic [KBITS+1:0] digit_mask(input int c, input int rec, input int d);
    logic [KBITS+1:0] m;
    for (int i = 0; i < KBITS + 2; i++) m[i] = (recode_digit(c, i, rec) == d);
    return m;
  endfunction

  // Rounding right shift applied after each 1-D pass (pass 0 = first pass).
  function automatic int pass_shift(input idct_mode_e mode, input logic pass);
    case (mode)
      MODE_MPEG2:   return pass ? 18 : 10;
      MODE_H264_HP: return pass ? 12 : 0;
      default:      return pass ? 8 : 0;
    endcase
  endfunction

  function automatic logic is_8x8(input idct_mode_e mode);
    return mode != MODE_H264_BL;
  endfunction

  // Tag carried alongside a 4x4 product through the array.
  typedef struct packed {
    idct_mode_e mode;
    logic       pass;   // 0: first (column) pass, 1: second pass
    logic       half;   // which four columns of an 8x8 block
  } mm_tag_t;

endpackage

// idct_coef_rom: the MODE-selected coefficient ("multiplicand") matrices.
//
// For a sub-matrix PART (even or odd half of the 8x8 matrix, or the 4x4
// baseline matrix in the even part), output row i and input row k it
// returns which constant of the shared magnitude table is used (kidx) and
// whether it is subtracted (neg). A processing element at stage k of the
// systolic array looks up its coefficient here every cycle as the output
// row i rotates. The even/odd split follows x(k) = g(k) + h(k) and
// x(7-k) = g(k) - h(k); for H.264 the standard's basis matrix is used
// transposed, which gives both 8x8 standards the same split. Combinational.
//
// The three matrices and their even/odd split follow the source
// architecture; the magnitude-index-plus-sign encoding is this design's own.
module idct_coef_rom
  import idct_pkg::*;
#(
  parameter int PART = PART_EVEN
) (
  input  idct_mode_e          mode,
  input  logic [1:0]          i,
  input  logic [1:0]          k,
  output logic [KIDX_W-1:0]   kidx,
  output logic                neg
);

  always_comb begin
    int c;
    c    = part_coef(mode, PART, int'(i), int'(k));
    kidx = KIDX_W'(kindex(iabs(c)));
    neg  = (c < 0);
  end

endmodule

// idct_csd_mult: multiplies a signed data word by the fixed positive
// constant COEF using only shifts, additions and subtractions.
//
// COEF is recoded into signed digits d_i in {-1,0,+1} (RECODE: plain binary,
// canonical signed digit, or the modified CSD the core uses by default) and
// the product is the sum of d_i * (x << i). With a constant COEF the loop
// below folds into one adder or subtractor per non-zero digit, which is how
// the design replaces its multipliers. Purely combinational.
//
// Replacing multipliers by shift-add networks with a modified-CSD coefficient
// follows the source architecture; the exact run-of-three rule is this
// design's reading of "use a -1 digit only where it saves an operation".
module idct_csd_mult
  import idct_pkg::*;
#(
  parameter int COEF   = 5792,
  parameter int RECODE = REC_MCSD,
  parameter int IW     = DW,
  parameter int OW     = DW + KBITS + 1
) (
  input  logic signed [IW-1:0] x,
  output logic signed [OW-1:0] p
);

  // Digit masks, fixed at elaboration: PMASK marks +1 digits, NMASK -1 digits.
  localparam logic [KBITS+1:0] PMASK = digit_mask(COEF, RECODE, 1);
  localparam logic [KBITS+1:0] NMASK = digit_mask(COEF, RECODE, -1);

  always_comb begin
    logic signed [OW-1:0] xe;
    xe = OW'(x);
    p  = '0;
    for (int i = 0; i < KBITS + 2; i++) begin
      if (PMASK[i])      p = p + (xe <<< i);
      else if (NMASK[i]) p = p - (xe <<< i);
    end
  end

endmodule

// cmul: complex multiplier built from real operators of one number format.
//
// (a + ib)(c + id) = (ac - bd) + i(ad + bc): four real multipliers, one
// subtractor and one adder.  Each real operation keeps the word length of its
// inputs (truncated and saturated as described in fft_pkg), so the result has
// the same width as the operands.  Complex words are packed {re, im}; x is
// the data operand and w the twiddle factor.  sat / ufl are the OR of the
// six operators' flags.  Combinational.
//
// From the study: four real multiplications and two additions, output kept at
// the input word length.
module cmul
  import fft_pkg::*;
#(
  parameter arith_e ARITH  = ARITH_FXP,
  parameter int     FXP_WL = 14,
  parameter int     FLP_EW = 2,
  parameter int     FLP_MW = 11,
  localparam int    W      = word_w(ARITH, FXP_WL, FLP_EW, FLP_MW)
) (
  input  logic [2*W-1:0] x,
  input  logic [2*W-1:0] w,
  output logic [2*W-1:0] y,
  output logic           sat,
  output logic           ufl
);
  logic [W-1:0] a, b, c, d;
  logic [W-1:0] ac, bd, ad, bc, re, im;
  logic [5:0]   s, u;

  assign {a, b} = x;
  assign {c, d} = w;

  arith_mul #(.ARITH(ARITH), .FXP_WL(FXP_WL), .FLP_EW(FLP_EW), .FLP_MW(FLP_MW)) u_ac (
    .a(a), .b(c), .y(ac), .sat(s[0]), .ufl(u[0]));
  arith_mul #(.ARITH(ARITH), .FXP_WL(FXP_WL), .FLP_EW(FLP_EW), .FLP_MW(FLP_MW)) u_bd (
    .a(b), .b(d), .y(bd), .sat(s[1]), .ufl(u[1]));
  arith_mul #(.ARITH(ARITH), .FXP_WL(FXP_WL), .FLP_EW(FLP_EW), .FLP_MW(FLP_MW)) u_ad (
    .a(a), .b(d), .y(ad), .sat(s[2]), .ufl(u[2]));
  arith_mul #(.ARITH(ARITH), .FXP_WL(FXP_WL), .FLP_EW(FLP_EW), .FLP_MW(FLP_MW)) u_bc (
    .a(b), .b(c), .y(bc), .sat(s[3]), .ufl(u[3]));

  arith_add #(.ARITH(ARITH), .FXP_WL(FXP_WL), .FLP_EW(FLP_EW), .FLP_MW(FLP_MW), .SUB(1'b1)) u_re (
    .a(ac), .b(bd), .y(re), .sat(s[4]), .ufl(u[4]));
  arith_add #(.ARITH(ARITH), .FXP_WL(FXP_WL), .FLP_EW(FLP_EW), .FLP_MW(FLP_MW), .SUB(1'b0)) u_im (
    .a(ad), .b(bc), .y(im), .sat(s[5]), .ufl(u[5]));

  assign y   = {re, im};
  assign sat = |s;
  assign ufl = |u;

endmodule

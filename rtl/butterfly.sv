// butterfly: radix-2 decimation-in-time butterfly of the memory-based FFT.
//
//   t  = W * X1            (complex multiply, cmul)
//   Y0 = X0 + t            (two real adders)
//   Y1 = X0 - t            (two real subtractors)
// Four multipliers and six adders in all, every one in the selected number
// format and word length.  When w_bypass is set (twiddle index 0, W = 1) the
// multiplication is skipped and X1 goes straight to the adders: 1 cannot be
// represented in a [-1, 1) format, and skipping it also avoids a needless
// truncation.  Complex words are {re, im}.  sat / ufl OR together the flags
// of every operator whose result is used.  Combinational: the memory-based
// FFT issues one butterfly per clock.
//
// From the study: radix-2 DIT butterfly with twiddle multiplication first, four
// multipliers and six adders, and the bypass for twiddle index 0.  Masking
// the flags during bypass is this design's own.
module butterfly
  import fft_pkg::*;
#(
  parameter arith_e ARITH  = ARITH_FXP,
  parameter int     FXP_WL = 14,
  parameter int     FLP_EW = 2,
  parameter int     FLP_MW = 11,
  localparam int    W      = word_w(ARITH, FXP_WL, FLP_EW, FLP_MW)
) (
  input  logic [2*W-1:0] x0,
  input  logic [2*W-1:0] x1,
  input  logic [2*W-1:0] w,
  input  logic           w_bypass,
  output logic [2*W-1:0] y0,
  output logic [2*W-1:0] y1,
  output logic           sat,
  output logic           ufl
);
  logic [2*W-1:0] prod, t;
  logic           m_sat, m_ufl;
  logic [W-1:0]   y0r, y0i, y1r, y1i;
  logic [3:0]     s, u;

  cmul #(.ARITH(ARITH), .FXP_WL(FXP_WL), .FLP_EW(FLP_EW), .FLP_MW(FLP_MW)) u_cmul (
    .x(x1), .w(w), .y(prod), .sat(m_sat), .ufl(m_ufl));

  assign t = w_bypass ? x1 : prod;

  arith_add #(.ARITH(ARITH), .FXP_WL(FXP_WL), .FLP_EW(FLP_EW), .FLP_MW(FLP_MW), .SUB(1'b0)) u_y0r (
    .a(x0[2*W-1:W]), .b(t[2*W-1:W]), .y(y0r), .sat(s[0]), .ufl(u[0]));
  arith_add #(.ARITH(ARITH), .FXP_WL(FXP_WL), .FLP_EW(FLP_EW), .FLP_MW(FLP_MW), .SUB(1'b0)) u_y0i (
    .a(x0[W-1:0]), .b(t[W-1:0]), .y(y0i), .sat(s[1]), .ufl(u[1]));
  arith_add #(.ARITH(ARITH), .FXP_WL(FXP_WL), .FLP_EW(FLP_EW), .FLP_MW(FLP_MW), .SUB(1'b1)) u_y1r (
    .a(x0[2*W-1:W]), .b(t[2*W-1:W]), .y(y1r), .sat(s[2]), .ufl(u[2]));
  arith_add #(.ARITH(ARITH), .FXP_WL(FXP_WL), .FLP_EW(FLP_EW), .FLP_MW(FLP_MW), .SUB(1'b1)) u_y1i (
    .a(x0[W-1:0]), .b(t[W-1:0]), .y(y1i), .sat(s[3]), .ufl(u[3]));

  assign y0  = {y0r, y0i};
  assign y1  = {y1r, y1i};
  assign sat = (|s) | (m_sat & ~w_bypass);
  assign ufl = (|u) | (m_ufl & ~w_bypass);

endmodule

// arith_add: one real adder (or subtractor, SUB = 1) in the number format
// chosen by ARITH: fxp_add for fixed point, flp_add for floating point.
// Lets the complex multiplier and the butterfly be written once for both
// formats.  ufl is always 0 for fixed point, which has no underflow flag.
//
// This wrapper is this design's own; it lets one datapath serve both formats.
module arith_add
  import fft_pkg::*;
#(
  parameter arith_e ARITH  = ARITH_FXP,
  parameter int     FXP_WL = 14,
  parameter int     FLP_EW = 2,
  parameter int     FLP_MW = 11,
  parameter bit     SUB    = 1'b0,
  localparam int    W      = word_w(ARITH, FXP_WL, FLP_EW, FLP_MW)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic         sat,
  output logic         ufl
);
  if (ARITH == ARITH_FXP) begin : g_fxp
    fxp_add #(.WL(FXP_WL), .SUB(SUB)) u_add (.a(a), .b(b), .y(y), .sat(sat));
    assign ufl = 1'b0;
  end else begin : g_flp
    flp_add #(.EW(FLP_EW), .MW(FLP_MW), .SUB(SUB)) u_add (
      .a(a), .b(b), .y(y), .sat(sat), .ufl(ufl)
    );
  end
endmodule

// arith_mul: one real multiplier in the number format chosen by ARITH:
// fxp_mul for fixed point, flp_mul for floating point.  ufl is always 0 for
// fixed point.
//
// This wrapper is this design's own; it lets one datapath serve both formats.
module arith_mul
  import fft_pkg::*;
#(
  parameter arith_e ARITH  = ARITH_FXP,
  parameter int     FXP_WL = 14,
  parameter int     FLP_EW = 2,
  parameter int     FLP_MW = 11,
  localparam int    W      = word_w(ARITH, FXP_WL, FLP_EW, FLP_MW)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic         sat,
  output logic         ufl
);
  if (ARITH == ARITH_FXP) begin : g_fxp
    fxp_mul #(.WL(FXP_WL)) u_mul (.a(a), .b(b), .y(y), .sat(sat));
    assign ufl = 1'b0;
  end else begin : g_flp
    flp_mul #(.EW(FLP_EW), .MW(FLP_MW)) u_mul (
      .a(a), .b(b), .y(y), .sat(sat), .ufl(ufl)
    );
  end
endmodule

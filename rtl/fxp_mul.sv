// fxp_mul: fixed-point S0.(WL-1) fractional multiplier.
//
// The two's complement operands are multiplied exactly (2*WL-bit product with
// 2*(WL-1) fraction bits), then the product is truncated toward zero back to
// WL-1 fraction bits.  A product of two fractions stays inside (-1, 1], so the
// only overflow is (-1)*(-1) = +1, which saturates to 1 - 2^-(WL-1) and
// raises sat.  Combinational.
//
// From the study: product truncated back to the input format, sign handled by
// two's complement.  The sat flag is this design's own.
module fxp_mul #(
  parameter int WL = 14
) (
  input  logic [WL-1:0] a,
  input  logic [WL-1:0] b,
  output logic [WL-1:0] y,
  output logic          sat
);
  logic signed [2*WL-1:0] p;

  assign p = $signed(a) * $signed(b);

  fxp_quantize #(.IW(2 * WL), .FS(2 * (WL - 1)), .WL(WL)) u_q (
    .d(p), .q(y), .sat(sat)
  );

endmodule

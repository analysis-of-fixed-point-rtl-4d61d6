// fxp_add: fixed-point S0.(WL-1) adder, or subtractor when SUB = 1.
//
// Both operands share one format, so no radix-point alignment is needed and
// the operation is a plain two's complement add with one extra integer bit.
// The word length is not allowed to grow (an iterative FFT reuses the same
// operator every stage), so the exact WL+1-bit sum is saturated back to WL
// bits; sat reports the clamp.  Combinational.
//
// From the study: two's complement addition with the word length kept and
// saturation on overflow.  The SUB parameter and sat flag are this design's own.
module fxp_add #(
  parameter int WL  = 14,
  parameter bit SUB = 1'b0
) (
  input  logic [WL-1:0] a,
  input  logic [WL-1:0] b,
  output logic [WL-1:0] y,
  output logic          sat
);
  logic signed [WL:0] s;

  assign s = SUB ? ($signed({a[WL-1], a}) - $signed({b[WL-1], b}))
                 : ($signed({a[WL-1], a}) + $signed({b[WL-1], b}));

  fxp_quantize #(.IW(WL + 1), .FS(WL - 1), .WL(WL)) u_q (
    .d(s), .q(y), .sat(sat)
  );

endmodule

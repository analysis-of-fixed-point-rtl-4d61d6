// flp_mul: floating-point multiplier for the {e, M} format of fft_pkg.
//
// The encoded exponents are added (one extra bit, so the sum cannot wrap) and
// the two's complement mantissas are multiplied exactly; the product's sign
// comes out of the two's complement multiply, so no separate XOR sign logic
// is needed.  flp_normalize then normalises the product, adjusts the exponent,
// applies gradual underflow or saturation ((-1)*(-1) at e = 0) and truncates
// the mantissa toward zero back to MW bits.  Combinational.
//
// From the study: exponents added and mantissas multiplied, then normalised.
// Two's complement mantissas (named there as an option) are this design's own.
module flp_mul #(
  parameter int EW = 2,
  parameter int MW = 11
) (
  input  logic [EW+MW-1:0] a,
  input  logic [EW+MW-1:0] b,
  output logic [EW+MW-1:0] y,
  output logic             sat,
  output logic             ufl
);
  logic signed [2*MW-1:0] p;
  logic [EW:0]            esum;

  assign p    = $signed(a[MW-1:0]) * $signed(b[MW-1:0]);
  assign esum = {1'b0, a[EW+MW-1:MW]} + {1'b0, b[EW+MW-1:MW]};

  flp_normalize #(.IW(2 * MW), .FS(2 * (MW - 1)), .EBW(EW + 1), .EW(EW), .MW(MW)) u_norm (
    .s(p), .ebase(esum), .y(y), .sat(sat), .ufl(ufl)
  );

endmodule

// flp_add: floating-point adder, or subtractor when SUB = 1, for the
// {e, M} format of fft_pkg (value = M * 2^-e, M two's complement).
//
// Exponent comparison picks the operand with the smaller encoded exponent
// (the larger scale); the other mantissa is shifted right by the exponent
// difference.  Both mantissas are first widened by EMAX = 2^EW-1 guard bits,
// so the alignment loses nothing and the two's complement sum is exact; the
// sign needs no separate handling.  flp_normalize then normalises the sum,
// adjusts the exponent, applies gradual underflow or saturation and
// truncates toward zero, so the result is the exact sum quantized once.
// Combinational.
//
// From the study: exponent comparison and right shift of the mantissa with the
// smaller exponent, then renormalisation.  Two's complement mantissas (named
// there as an option) and exact alignment with guard bits are this design's own.
module flp_add #(
  parameter int EW  = 2,
  parameter int MW  = 11,
  parameter bit SUB = 1'b0
) (
  input  logic [EW+MW-1:0] a,
  input  logic [EW+MW-1:0] b,
  output logic [EW+MW-1:0] y,
  output logic             sat,
  output logic             ufl
);
  localparam int EMAX = (1 << EW) - 1;
  localparam int AW   = MW + 1 + EMAX;  // aligned operand width
  localparam int SW   = AW + 1;         // sum width

  logic [EW-1:0]        ea, eb, e_lo, d;
  logic signed [MW:0]   ma, mb;
  logic signed [AW-1:0] xa, xb, x_hi, x_lo;
  logic signed [SW-1:0] sum;

  assign ea = a[EW+MW-1:MW];
  assign eb = b[EW+MW-1:MW];
  assign ma = $signed({a[MW-1], a[MW-1:0]});
  // widened by one bit first so that -(-1) stays representable
  assign mb = SUB ? -$signed({b[MW-1], b[MW-1:0]}) : $signed({b[MW-1], b[MW-1:0]});

  assign xa = AW'(ma) <<< EMAX;
  assign xb = AW'(mb) <<< EMAX;

  always_comb begin
    if (ea <= eb) begin
      e_lo = ea;
      d    = eb - ea;
      x_hi = xa;
      x_lo = xb;
    end else begin
      e_lo = eb;
      d    = ea - eb;
      x_hi = xb;
      x_lo = xa;
    end
  end

  assign sum = SW'(x_hi) + SW'(x_lo >>> d);

  flp_normalize #(.IW(SW), .FS(MW - 1 + EMAX), .EBW(EW), .EW(EW), .MW(MW)) u_norm (
    .s(sum), .ebase(e_lo), .y(y), .sat(sat), .ufl(ufl)
  );

endmodule

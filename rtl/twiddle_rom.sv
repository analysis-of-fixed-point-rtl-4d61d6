// twiddle_rom: constant table of the N/2 twiddle factors of an N-point
// radix-2 FFT, W_N^k = cos(2*pi*k/N) - i*sin(2*pi*k/N), k = 0 .. N/2-1.
//
// The table is computed at elaboration with $cos/$sin and quantized with the
// same rule as the data: truncation toward zero, saturation at the format's
// ends.  Fixed point: code = trunc(x * 2^(WL-1)).  Floating point: exponent
// e = -(floor(log2|x|) + 1) clamped to [0, 2^EW-1], mantissa
// trunc(x * 2^e * 2^(MW-1)).  Entry 0 (W = 1) saturates to the largest
// value and is never used: the butterfly bypasses the multiplication for
// k = 0.  Output {re, im}; combinational read.
//
// From the study: twiddles quantized to the data format.  Computing the table
// at elaboration is this design's own.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int     N      = 64,
  parameter arith_e ARITH  = ARITH_FXP,
  parameter int     FXP_WL = 14,
  parameter int     FLP_EW = 2,
  parameter int     FLP_MW = 11,
  localparam int    W      = word_w(ARITH, FXP_WL, FLP_EW, FLP_MW),
  localparam int    KW     = $clog2(N) - 1
) (
  input  logic [KW-1:0]  k,
  output logic [2*W-1:0] w
);
  localparam real PI = 3.14159265358979323846;

  // Quantize a real value in [-1, 1] to one word of the selected format.
  function automatic logic [W-1:0] quant(real x);
    longint m;
    int     e;
    int     f;
    real    ax;
    if (ARITH == ARITH_FXP) begin
      f = FXP_WL - 1;
      m = longint'($rtoi(x * (2.0 ** f)));
      if (m > (64'sd1 <<< f) - 1) m = (64'sd1 <<< f) - 1;
      if (m < -(64'sd1 <<< f))    m = -(64'sd1 <<< f);
      return W'(m);
    end else begin
      f  = FLP_MW - 1;
      ax = (x < 0.0) ? -x : x;
      if (ax >= 1.0) begin
        m = (x < 0.0) ? -(64'sd1 <<< f) : (64'sd1 <<< f) - 1;
        e = 0;
      end else begin
        e = 0;
        while (ax * (2.0 ** e) < 0.5 && e < (1 << FLP_EW) - 1) e++;
        m = longint'($rtoi(x * (2.0 ** (e + f))));
        if (m == 0) e = (1 << FLP_EW) - 1;
      end
      return W'({FLP_EW'(e), FLP_MW'(m)});
    end
  endfunction

  logic [2*W-1:0] rom [N/2];

  for (genvar i = 0; i < N / 2; i++) begin : g_tab
    localparam logic [W-1:0] RE = quant($cos(2.0 * PI * i / N));
    localparam logic [W-1:0] IM = quant(-$sin(2.0 * PI * i / N));
    assign rom[i] = {RE, IM};
  end

  assign w = rom[k];

endmodule

// fxp_quantize: re-quantizes a wide two's complement fixed-point value to the
// S0.(WL-1) format.
//
// The input d carries FS fraction bits (FS >= WL-1).  The fraction bits below
// the output LSB are dropped with truncation toward zero (a negative value
// with non-zero dropped bits is moved up by one LSB, as a Matlab fix() of the
// scaled value would do).  The truncated value is then saturated to
// [-1, 1 - 2^-(WL-1)] and sat flags that the clamp was applied.  Used by the
// fixed-point adder and multiplier; purely combinational.
//
// From the study: keep the word length, truncate toward zero, saturate on
// overflow.  The shared-quantizer structure is this design's own.
module fxp_quantize #(
  parameter int IW = 15,  // input width
  parameter int FS = 13,  // input fraction bits
  parameter int WL = 14   // output word length
) (
  input  logic signed [IW-1:0] d,
  output logic        [WL-1:0] q,
  output logic                 sat
);
  localparam int F  = WL - 1;
  localparam int SH = FS - F;
  localparam logic signed [IW-1:0] MAXV = IW'((64'sd1 <<< F) - 1);
  localparam logic signed [IW-1:0] MINV = -IW'(64'sd1 <<< F);

  logic signed [IW-1:0] t;

  if (SH > 0) begin : g_shift
    logic signed [IW-1:0] sh;
    logic                 nz;
    assign sh = d >>> SH;
    assign nz = |d[SH-1:0];
    assign t  = (d[IW-1] && nz) ? sh + IW'(1) : sh;
  end else begin : g_noshift
    assign t = d;
  end

  always_comb begin
    sat = 1'b0;
    q   = t[WL-1:0];
    if (t > MAXV) begin
      sat = 1'b1;
      q   = MAXV[WL-1:0];
    end else if (t < MINV) begin
      sat = 1'b1;
      q   = MINV[WL-1:0];
    end
  end

endmodule

// flp_normalize: turns an exact intermediate result into the floating-point
// format {e, M} (EW-bit encoded exponent, MW-bit two's complement mantissa).
//
// The value presented is s * 2^-FS * 2^-ebase: a signed fixed-point number
// with FS fraction bits and a base exponent ebase (the exponent of the
// operands the result was formed from).  The steps follow the floating-point
// quantizer: a leading-one search on |s| finds floor(log2|v|), the exponent
// is chosen so the mantissa magnitude lands in [0.5, 1); if that needs an
// exponent above zero the result saturates (to the largest positive value or
// to -1, with e = 0); if it needs more than 2^EW-1 the exponent is clamped and
// the mantissa stays unnormalised (gradual underflow, ufl = 1, possibly
// flushing to zero).  The mantissa magnitude is then truncated to MW-1
// fraction bits, which is truncation toward zero of the signed value.  Zero
// encodes as M = 0, e = 2^EW-1.  Combinational.
//
// From the study: normalisation, gradual underflow at the largest exponent code
// and saturation.  The zero encoding (M = 0, e = EMAX) and the flags are this
// design's own.
module flp_normalize #(
  parameter int IW  = 16,  // width of s
  parameter int FS  = 13,  // fraction bits of s
  parameter int EBW = 2,   // width of ebase
  parameter int EW  = 2,
  parameter int MW  = 11
) (
  input  logic signed [IW-1:0]    s,
  input  logic        [EBW-1:0]   ebase,
  output logic        [EW+MW-1:0] y,
  output logic                    sat,
  output logic                    ufl
);
  localparam int F    = MW - 1;
  localparam int EMAX = (1 << EW) - 1;
  localparam int PW   = $clog2(IW + 1);
  // shift amounts reach FS + max(ebase); wide enough for any of them
  localparam int RSW  = $clog2(FS + (1 << EBW) + 2) + 1;

  logic [IW-1:0]   mag;
  logic [PW-1:0]   lead;     // index of the leading one of mag
  logic            nz;
  logic [IW+F-1:0] wide;
  logic [MW-1:0]   shifted;
  logic [RSW-1:0]  rs;
  logic [EW-1:0]   e_out;
  logic [MW-1:0]   m_out;
  logic            sat_i;
  logic            ufl_i;
  int              e_raw;

  assign mag = s[IW-1] ? IW'(-s) : IW'(s);

  always_comb begin
    lead = '0;
    nz   = 1'b0;
    for (int i = 0; i < IW; i++) begin
      if (mag[i]) begin
        lead = PW'(i);
        nz   = 1'b1;
      end
    end
  end

  // exponent that normalises the mantissa: ebase + FS - lead - 1
  assign e_raw = int'(ebase) + FS - int'(lead) - 1;
  assign wide  = {mag, F'(0)};

  always_comb begin
    sat_i = 1'b0;
    ufl_i = 1'b0;
    e_out = EW'(EMAX);
    rs    = '0;
    if (!nz) begin
      e_out = EW'(EMAX);
    end else if (e_raw < 0) begin
      sat_i = 1'b1;
      e_out = '0;
    end else if (e_raw > EMAX) begin
      ufl_i = 1'b1;
      e_out = EW'(EMAX);
    end else begin
      e_out = EW'(e_raw);
    end
    // mantissa magnitude = mag * 2^(F - FS + e_out - ebase)
    rs = RSW'(FS + int'(ebase) - int'(e_out));
  end

  assign shifted = MW'(wide >> rs);

  always_comb begin
    if (!nz) begin
      m_out = '0;
    end else if (sat_i) begin
      m_out = s[IW-1] ? {1'b1, {(MW-1){1'b0}}} : {1'b0, {(MW-1){1'b1}}};
    end else begin
      m_out = s[IW-1] ? -shifted : shifted;
    end
  end

  assign y   = {e_out, m_out};
  assign sat = sat_i;
  assign ufl = ufl_i;

endmodule

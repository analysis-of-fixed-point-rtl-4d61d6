// fft_top: the two 64-point memory-based radix-2 FFTs whose area and
// accuracy are being compared, side by side: one in fixed point S0.13
// (14-bit words) and one in floating point with a 2-bit encoded exponent and
// an 11-bit two's complement mantissa (13-bit words).  These are the
// shortest formats of each kind that keep the transform's signal to
// quantization noise ratio above 40 dB for Gaussian input scaled to 9 % of
// full range.  The cores share only clock and reset; each has its own
// streaming ports (see fft_core): fxp_* carries 2x14-bit {re, im} words,
// flp_* carries 2x13-bit {re, im} words, each word {exponent, mantissa}.
//
// From the study: the two default formats, the shortest meeting 40 dB SQNR.
// Placing both cores in one top is this design's own.
module fft_top
  import fft_pkg::*;
#(
  parameter int  N      = 64,
  parameter int  FXP_WL = 14,
  parameter int  FLP_EW = 2,
  parameter int  FLP_MW = 11,
  localparam int FW     = FXP_WL,
  localparam int LW     = FLP_EW + FLP_MW
) (
  input  logic            clk,
  input  logic            rst_n,
  // fixed-point FFT
  input  logic            fxp_in_valid,
  output logic            fxp_in_ready,
  input  logic [2*FW-1:0] fxp_in_data,
  output logic            fxp_out_valid,
  input  logic            fxp_out_ready,
  output logic [2*FW-1:0] fxp_out_data,
  output logic            fxp_out_last,
  output logic            fxp_sat_seen,
  // floating-point FFT
  input  logic            flp_in_valid,
  output logic            flp_in_ready,
  input  logic [2*LW-1:0] flp_in_data,
  output logic            flp_out_valid,
  input  logic            flp_out_ready,
  output logic [2*LW-1:0] flp_out_data,
  output logic            flp_out_last,
  output logic            flp_sat_seen,
  output logic            flp_ufl_seen
);
  logic fxp_ufl_unused;

  fft_core #(.N(N), .ARITH(ARITH_FXP), .FXP_WL(FXP_WL), .FLP_EW(FLP_EW), .FLP_MW(FLP_MW)) u_fxp (
    .clk(clk), .rst_n(rst_n),
    .in_valid(fxp_in_valid), .in_ready(fxp_in_ready), .in_data(fxp_in_data),
    .out_valid(fxp_out_valid), .out_ready(fxp_out_ready), .out_data(fxp_out_data),
    .out_last(fxp_out_last), .sat_seen(fxp_sat_seen), .ufl_seen(fxp_ufl_unused)
  );

  fft_core #(.N(N), .ARITH(ARITH_FLP), .FXP_WL(FXP_WL), .FLP_EW(FLP_EW), .FLP_MW(FLP_MW)) u_flp (
    .clk(clk), .rst_n(rst_n),
    .in_valid(flp_in_valid), .in_ready(flp_in_ready), .in_data(flp_in_data),
    .out_valid(flp_out_valid), .out_ready(flp_out_ready), .out_data(flp_out_data),
    .out_last(flp_out_last), .sat_seen(flp_sat_seen), .ufl_seen(flp_ufl_seen)
  );

endmodule

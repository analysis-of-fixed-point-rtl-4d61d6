// tb_sqnr_sweep: runs the 64-point memory-based FFT core in every number
// format of the word-length study: fixed point S0.8 .. S0.23 (9 to 24 bits)
// and floating point with 2, 3 or 4 exponent bits and 6 to 16 mantissa bits.
// Every core is driven by fft_stream_drv for 16 transforms (8 of them
// Gaussian noise with sigma 0.02 clipped at 9 % of full range) and checked
// bit for bit against the reference FFT.  The measured signal-to-
// quantization-noise ratio against a double precision DFT of the unquantized
// input is printed next to the published figure for the same format, and a
// format fails if the two differ by more than 3 dB.  The same is done against
// a reference that shares the rounding of the input and the output: the
// exact DFT of the quantized input, quantized to the format.  That comparison
// leaves out the input rounding noise, so it is more sensitive to the input
// level; fixed point measures about 3.5 dB above the published values, and
// the tolerance there is 5 dB.
//
// From the study: the 49 formats and their published SQNR values.  Stimulus,
// transform count and tolerance are this design's own.
module tb_sqnr_sweep;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NFX = 16;
  localparam int NFL = 33;
  localparam int NT  = 16;

  // published SQNR [dB], reference without quantization
  localparam real FX_PUB [NFX] = '{14.52, 20.39, 26.35, 32.31, 38.32, 44.27, 50.31, 56.30,
                                   62.30, 68.31, 74.34, 80.35, 86.42, 92.43, 98.41, 104.48};
  localparam real FL_PUB [NFL] = '{12.69, 18.60, 24.19, 30.25, 36.41, 42.45, 48.31, 54.21,
                                   59.92, 66.07, 71.97,
                                   14.48, 20.51, 25.99, 32.12, 38.35, 44.39, 50.19, 56.07,
                                   61.66, 67.86, 73.72,
                                   14.45, 20.49, 25.97, 32.09, 38.32, 44.36, 50.16, 56.05,
                                   61.64, 67.84, 73.70};
  // published SQNR [dB], reference with input and output quantization
  localparam real FX_PUBQ [NFX] = '{18.98, 25.18, 31.30, 37.34, 43.38, 49.31, 55.36, 61.36,
                                    67.35, 73.36, 79.39, 85.38, 91.49, 97.51, 103.46, 109.56};
  localparam real FL_PUBQ [NFL] = '{16.41, 22.70, 28.14, 34.35, 40.67, 46.73, 52.47, 58.32,
                                    63.80, 70.04, 75.84,
                                    16.21, 22.46, 27.91, 34.11, 40.44, 46.49, 52.25, 58.09,
                                    63.58, 69.82, 75.62,
                                    16.21, 22.46, 27.91, 34.11, 40.44, 46.49, 52.25, 58.09,
                                    63.58, 69.82, 75.62};

  real fx_q [NFX], fx_qq [NFX];
  int  fx_c [NFX], fx_f [NFX];
  bit  fx_done [NFX];
  real fl_q [NFL], fl_qq [NFL];
  int  fl_c [NFL], fl_f [NFL];
  bit  fl_done [NFL];

  for (genvar g = 0; g < NFX; g++) begin : g_fx
    localparam int WL = 9 + g;
    logic            iv, ir, ov, ordy, ol, s, u, fin;
    logic [2*WL-1:0] id, od;
    int              c, f, is, os, ns, nu;
    real             q, qq;
    fft_core #(.ARITH(fft_pkg::ARITH_FXP), .FXP_WL(WL)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(iv), .in_ready(ir), .in_data(id),
      .out_valid(ov), .out_ready(ordy), .out_data(od), .out_last(ol), .sat_seen(s),
      .ufl_seen(u));
    fft_stream_drv #(.FLP(0), .WL(WL), .NT(NT)) drv (
      .clk(clk), .rst_n(rst_n), .in_valid(iv), .in_ready(ir), .in_data(id),
      .out_valid(ov), .out_ready(ordy), .out_data(od), .out_last(ol), .sat_seen(s),
      .ufl_seen(u), .finished(fin), .checks(c), .failures(f), .n_in_stall(is),
      .n_out_stall(os), .n_sat(ns), .n_ufl(nu), .sqnr_db(q), .sqnr_q_db(qq));
    initial begin
      fx_done[g] = 0;
      @(posedge rst_n);
      wait (fin);
      fx_q[g] = q; fx_qq[g] = qq; fx_c[g] = c; fx_f[g] = f; fx_done[g] = 1;
    end
  end

  for (genvar g = 0; g < NFL; g++) begin : g_fl
    localparam int EW = 2 + g / 11;
    localparam int MW = 6 + g % 11;
    logic                 iv, ir, ov, ordy, ol, s, u, fin;
    logic [2*(EW+MW)-1:0] id, od;
    int                   c, f, is, os, ns, nu;
    real                  q, qq;
    fft_core #(.ARITH(fft_pkg::ARITH_FLP), .FLP_EW(EW), .FLP_MW(MW)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(iv), .in_ready(ir), .in_data(id),
      .out_valid(ov), .out_ready(ordy), .out_data(od), .out_last(ol), .sat_seen(s),
      .ufl_seen(u));
    fft_stream_drv #(.FLP(1), .EW(EW), .MW(MW), .NT(NT)) drv (
      .clk(clk), .rst_n(rst_n), .in_valid(iv), .in_ready(ir), .in_data(id),
      .out_valid(ov), .out_ready(ordy), .out_data(od), .out_last(ol), .sat_seen(s),
      .ufl_seen(u), .finished(fin), .checks(c), .failures(f), .n_in_stall(is),
      .n_out_stall(os), .n_sat(ns), .n_ufl(nu), .sqnr_db(q), .sqnr_q_db(qq));
    initial begin
      fl_done[g] = 0;
      @(posedge rst_n);
      wait (fin);
      fl_q[g] = q; fl_qq[g] = qq; fl_c[g] = c; fl_f[g] = f; fl_done[g] = 1;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  function automatic bit all_done();
    foreach (fx_done[i]) if (!fx_done[i]) return 0;
    foreach (fl_done[i]) if (!fl_done[i]) return 0;
    return 1;
  endfunction

  initial begin
    int  checks, failures;
    real d;
    checks   = 0;
    failures = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    while (!all_done()) @(posedge clk);
    $display("                    unquantized reference   quantized reference");
    $display("format          WL  measured  published     measured  published  bit-exact");
    for (int i = 0; i < NFX; i++) begin
      d = fx_q[i] - FX_PUB[i];
      checks += fx_c[i] + 2;
      failures += fx_f[i];
      if (d > 3.0 || d < -3.0) failures++;
      d = fx_qq[i] - FX_PUBQ[i];
      if (d > 5.0 || d < -5.0) failures++;
      $display("FXP S0.%-2d      %2d  %8.2f  %8.2f     %8.2f  %8.2f   %s", 8 + i, 9 + i, fx_q[i],
               FX_PUB[i], fx_qq[i], FX_PUBQ[i], fx_f[i] == 0 ? "yes" : "NO");
    end
    for (int i = 0; i < NFL; i++) begin
      d = fl_q[i] - FL_PUB[i];
      checks += fl_c[i] + 2;
      failures += fl_f[i];
      if (d > 3.0 || d < -3.0) failures++;
      d = fl_qq[i] - FL_PUBQ[i];
      if (d > 5.0 || d < -5.0) failures++;
      $display("FLP e%0d m%-2d      %2d  %8.2f  %8.2f     %8.2f  %8.2f   %s", 2 + i / 11,
               6 + i % 11, 8 + i / 11 + i % 11, fl_q[i], FL_PUB[i], fl_qq[i], FL_PUBQ[i],
               fl_f[i] == 0 ? "yes" : "NO");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

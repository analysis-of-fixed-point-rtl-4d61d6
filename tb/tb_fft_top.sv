// tb_fft_top: end-to-end test of fft_top at its default parameters (64
// points, fixed point S0.13 and floating point 2+11 bits side by side).
// Both cores run 24 transforms at the same time through fft_stream_drv:
// bit-exact comparison with the reference FFT, 192-cycle compute, and a
// signal-to-quantization-noise ratio of at least 40 dB for Gaussian input at
// 9 % of full range (the target the formats were chosen for).  It counts how
// often each mechanism of the design occurred and fails if one never did:
// twiddle bypass (index 0), input stall while computing, output backpressure,
// saturation in each format and gradual underflow in floating point.
//
// From the study: Gaussian input peaking at 9 % of full range, SQNR against an
// unquantized reference, 192-clock latency.  Handshake stalls, overdriven and
// tiny transforms and the flag checks are this design's own.
module tb_fft_top;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        xiv, xir, xov, xor_, xol, xs, xfin;
  logic [27:0] xid, xod;
  logic        liv, lir, lov, lor, lol, ls, lu, lfin;
  logic [25:0] lid, lod;
  int          xc, xf, xis, xos, xns, xnu, lc, lf, lis, los, lns, lnu;
  real         xq, lq, xqq, lqq;
  int          checks = 0, failures = 0;
  int          n_bypass_fxp = 0, n_bypass_flp = 0, n_bfly_fxp = 0;

  fft_top dut (
    .clk(clk), .rst_n(rst_n),
    .fxp_in_valid(xiv), .fxp_in_ready(xir), .fxp_in_data(xid),
    .fxp_out_valid(xov), .fxp_out_ready(xor_), .fxp_out_data(xod), .fxp_out_last(xol),
    .fxp_sat_seen(xs),
    .flp_in_valid(liv), .flp_in_ready(lir), .flp_in_data(lid),
    .flp_out_valid(lov), .flp_out_ready(lor), .flp_out_data(lod), .flp_out_last(lol),
    .flp_sat_seen(ls), .flp_ufl_seen(lu));

  fft_stream_drv #(.FLP(0), .WL(14), .NT(24)) drv_fxp (
    .clk(clk), .rst_n(rst_n), .in_valid(xiv), .in_ready(xir), .in_data(xid),
    .out_valid(xov), .out_ready(xor_), .out_data(xod), .out_last(xol), .sat_seen(xs),
    .ufl_seen(1'b0), .finished(xfin), .checks(xc), .failures(xf), .n_in_stall(xis),
    .n_out_stall(xos), .n_sat(xns), .n_ufl(xnu), .sqnr_db(xq), .sqnr_q_db(xqq));
  fft_stream_drv #(.FLP(1), .EW(2), .MW(11), .NT(24)) drv_flp (
    .clk(clk), .rst_n(rst_n), .in_valid(liv), .in_ready(lir), .in_data(lid),
    .out_valid(lov), .out_ready(lor), .out_data(lod), .out_last(lol), .sat_seen(ls),
    .ufl_seen(lu), .finished(lfin), .checks(lc), .failures(lf), .n_in_stall(lis),
    .n_out_stall(los), .n_sat(lns), .n_ufl(lnu), .sqnr_db(lq), .sqnr_q_db(lqq));

  // butterflies issued, and those that bypassed the twiddle multiplication
  always @(posedge clk) begin
    if (rst_n && dut.u_fxp.bf_active) begin
      n_bfly_fxp <= n_bfly_fxp + 1;
      if (dut.u_fxp.tw_idx == '0) n_bypass_fxp <= n_bypass_fxp + 1;
    end
    if (rst_n && dut.u_flp.bf_active && dut.u_flp.tw_idx == '0) n_bypass_flp <= n_bypass_flp + 1;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", xc + lc, xf + lf + 1);
    $finish;
  end

  task automatic need(string what, int count);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    wait (xfin && lfin);
    $display("fixed point    SQNR %0.2f dB (%0.2f dB against a quantized reference)", xq, xqq);
    $display("floating point SQNR %0.2f dB (%0.2f dB against a quantized reference)", lq, lqq);
    $display("mechanisms:");
    need("twiddle bypass, fixed point", n_bypass_fxp);
    need("twiddle bypass, floating point", n_bypass_flp);
    need("input stall, fixed point", xis);
    need("input stall, floating point", lis);
    need("output backpressure, fixed point", xos);
    need("output backpressure, floating point", los);
    need("saturation, fixed point", xns);
    need("saturation, floating point", lns);
    need("gradual underflow, floating point", lnu);
    // 24 transforms of 192 butterflies; 63 of each 192 use twiddle index 0
    checks += 2;
    if (n_bfly_fxp != 24 * 192) failures++;
    if (n_bypass_fxp != 24 * 63) failures++;
    checks += 2;
    if (xq < 40.0) failures++;
    if (lq < 40.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + xc + lc, failures + xf + lf);
    $finish;
  end
endmodule

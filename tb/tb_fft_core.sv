// tb_fft_core: end-to-end test of the memory-based 64-point FFT core in both
// number formats (fixed point S0.13, floating point 2+11 bits).  Each core
// runs 12 transforms through fft_stream_drv: bit-exact comparison with the
// reference FFT, 192-cycle compute latency, input stall while computing,
// output backpressure, saturation and (floating point) gradual underflow,
// and a signal-to-quantization-noise ratio above 40 dB for Gaussian input at
// 9 % of full range.
//
// From the study: Gaussian input peaking at 9 % of full range, SQNR against an
// unquantized reference, 192-clock latency.  Handshake stalls, overdriven and
// tiny transforms and the flag checks are this design's own.
module tb_fft_core;
  import fft_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        xiv, xir, xov, xor_, xol, xs, xu, xfin;
  logic [27:0] xid, xod;
  logic        liv, lir, lov, lor, lol, ls, lu, lfin;
  logic [25:0] lid, lod;
  int          xc, xf, xis, xos, xns, xnu, lc, lf, lis, los, lns, lnu;
  real         xq, lq, xqq, lqq;
  int          checks = 0, failures = 0;

  fft_core #(.ARITH(ARITH_FXP)) dut_fxp (
    .clk(clk), .rst_n(rst_n), .in_valid(xiv), .in_ready(xir), .in_data(xid),
    .out_valid(xov), .out_ready(xor_), .out_data(xod), .out_last(xol), .sat_seen(xs),
    .ufl_seen(xu));
  fft_stream_drv #(.FLP(0), .WL(14), .NT(12)) drv_fxp (
    .clk(clk), .rst_n(rst_n), .in_valid(xiv), .in_ready(xir), .in_data(xid),
    .out_valid(xov), .out_ready(xor_), .out_data(xod), .out_last(xol), .sat_seen(xs),
    .ufl_seen(xu), .finished(xfin), .checks(xc), .failures(xf), .n_in_stall(xis),
    .n_out_stall(xos), .n_sat(xns), .n_ufl(xnu), .sqnr_db(xq), .sqnr_q_db(xqq));

  fft_core #(.ARITH(ARITH_FLP)) dut_flp (
    .clk(clk), .rst_n(rst_n), .in_valid(liv), .in_ready(lir), .in_data(lid),
    .out_valid(lov), .out_ready(lor), .out_data(lod), .out_last(lol), .sat_seen(ls),
    .ufl_seen(lu));
  fft_stream_drv #(.FLP(1), .EW(2), .MW(11), .NT(12)) drv_flp (
    .clk(clk), .rst_n(rst_n), .in_valid(liv), .in_ready(lir), .in_data(lid),
    .out_valid(lov), .out_ready(lor), .out_data(lod), .out_last(lol), .sat_seen(ls),
    .ufl_seen(lu), .finished(lfin), .checks(lc), .failures(lf), .n_in_stall(lis),
    .n_out_stall(los), .n_sat(lns), .n_ufl(lnu), .sqnr_db(lq), .sqnr_q_db(lqq));

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", xc + lc, xf + lf + 1);
    $finish;
  end

  task automatic need(string what, int count);
    checks++;
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
    $display("fixed point   : SQNR %0.2f dB (quantized reference %0.2f dB), sat %0d, input stalls %0d, output stalls %0d",
             xq, xqq, xns, xis, xos);
    $display("floating point: SQNR %0.2f dB (quantized reference %0.2f dB), sat %0d, underflow %0d, input stalls %0d, output stalls %0d",
             lq, lqq, lns, lnu, lis, los);
    need("fixed-point saturation", xns);
    need("fixed-point input stall", xis);
    need("fixed-point output backpressure", xos);
    need("floating-point saturation", lns);
    need("floating-point gradual underflow", lnu);
    need("floating-point input stall", lis);
    need("floating-point output backpressure", los);
    checks += 2;
    if (xq < 40.0) failures++;
    if (lq < 40.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + xc + lc, failures + xf + lf);
    $finish;
  end
endmodule

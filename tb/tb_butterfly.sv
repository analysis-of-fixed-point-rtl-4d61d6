// tb_butterfly: self-checking test of the radix-2 DIT butterfly in both
// number formats.  Random data words with real twiddle factors (random index
// k of the 64-point table, k = 0 using the bypass) are compared with the
// reference butterfly of tb_ref_pkg, outputs and flags.
//
// From the study: the arithmetic rules the expected values are built from.
// The stimulus and checks are this design's own.
module tb_butterfly;
  import tb_ref_pkg::*;
  import fft_pkg::*;

  localparam fmt_t FX = '{flp: 0, wl: 14, ew: 0, mw: 0};
  localparam fmt_t FL = '{flp: 1, wl: 0, ew: 2, mw: 11};

  int checks = 0, failures = 0, nbyp = 0;

  logic [27:0] x0x, x1x, wx, y0x, y1x;
  logic [25:0] x0l, x1l, wl, y0l, y1l;
  logic        byp, sx, ux, sl, ul;

  butterfly #(.ARITH(ARITH_FXP)) dut_fxp (
    .x0(x0x), .x1(x1x), .w(wx), .w_bypass(byp), .y0(y0x), .y1(y1x), .sat(sx), .ufl(ux));
  butterfly #(.ARITH(ARITH_FLP)) dut_flp (
    .x0(x0l), .x1(x1l), .w(wl), .w_bypass(byp), .y0(y0l), .y1(y1l), .sat(sl), .ufl(ul));

  function automatic longint fld(longint v, int w, int hi);
    return (v >> (hi * w)) & ((64'sd1 <<< w) - 1);
  endfunction

  task automatic cmp(fmt_t f, int w, longint x0, longint x1, longint c, bit bp,
                     longint g0, longint g1, bit gs, bit gu);
    longint a, b, d, e;
    bit     s, u;
    ref_bfly(f, fld(x0, w, 1), fld(x0, w, 0), fld(x1, w, 1), fld(x1, w, 0), fld(c, w, 1),
             fld(c, w, 0), bp, a, b, d, e, s, u);
    checks++;
    if (g0 != ((a << w) | b) || g1 != ((d << w) | e) || gs != s || gu != u) begin
      failures++;
      $display("FAIL flp=%0d byp=%0d x0=%h x1=%h w=%h y0=%h y1=%h", f.flp, bp, x0, x1, c,
               g0, g1);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint r, i;
    int     k;
    // hand-worked bypass (fixed point): x0 = 0.25, x1 = 0.5i -> y0 = 0.25+0.5i, y1 = 0.25-0.5i
    byp = 1; x0x = {14'h0800, 14'h0000}; x1x = {14'h0000, 14'h1000}; wx = '0; #1;
    checks++;
    if (y0x != {14'h0800, 14'h1000} || y1x != {14'h0800, 14'h3000}) failures++;
    repeat (10000) begin
      k   = $urandom_range(0, 31);
      byp = (k == 0);
      nbyp += int'(byp);
      // data kept small as in the FFT (|x| < 0.25) half of the time
      x0x = 28'($urandom); x1x = 28'($urandom);
      if ($urandom_range(0, 1) != 0) begin
        x0x = {{3{x0x[27]}}, x0x[24:14], {3{x0x[13]}}, x0x[10:0]};
        x1x = {{3{x1x[27]}}, x1x[24:14], {3{x1x[13]}}, x1x[10:0]};
      end
      ref_twiddle(FX, 64, k, r, i);
      wx = 28'((r << 14) | i);
      x0l = 26'($urandom); x1l = 26'($urandom);
      ref_twiddle(FL, 64, k, r, i);
      wl = 26'((r << 13) | i);
      #1;
      cmp(FX, 14, longint'(x0x), longint'(x1x), longint'(wx), byp, longint'(y0x),
          longint'(y1x), sx, ux);
      cmp(FL, 13, longint'(x0l), longint'(x1l), longint'(wl), byp, longint'(y0l),
          longint'(y1l), sl, ul);
    end
    checks++;
    if (nbyp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

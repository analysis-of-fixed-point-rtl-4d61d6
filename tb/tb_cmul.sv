// tb_cmul: self-checking test of the complex multiplier in both number
// formats (fixed point S0.13 and floating point 2+11 bits).  Random complex
// operands; both result parts and the flags are compared with the
// four-multiply / two-add reference of tb_ref_pkg.
//
// From the study: the arithmetic rules the expected values are built from.
// The stimulus and checks are this design's own.
module tb_cmul;
  import tb_ref_pkg::*;
  import fft_pkg::*;

  localparam fmt_t FX = '{flp: 0, wl: 14, ew: 0, mw: 0};
  localparam fmt_t FL = '{flp: 1, wl: 0, ew: 2, mw: 11};

  int checks = 0, failures = 0, nsat = 0;

  logic [27:0] xx, wx, yx;
  logic        sx, ux;
  logic [25:0] xl, wl, yl;
  logic        sl, ul;

  cmul #(.ARITH(ARITH_FXP)) dut_fxp (.x(xx), .w(wx), .y(yx), .sat(sx), .ufl(ux));
  cmul #(.ARITH(ARITH_FLP)) dut_flp (.x(xl), .w(wl), .y(yl), .sat(sl), .ufl(ul));

  task automatic cmp(fmt_t f, int w, longint x, longint c, longint got, bit gs, bit gu);
    longint er, ei, m;
    bit     es, eu;
    m = (64'sd1 <<< w) - 1;
    ref_cmul(f, (x >> w) & m, x & m, (c >> w) & m, c & m, er, ei, es, eu);
    checks++;
    if (got != ((er << w) | ei) || gs != es || gu != eu) begin
      failures++;
      $display("FAIL flp=%0d x=%h w=%h y=%h exp=%h%h", f.flp, x, c, got, er, ei);
    end
    nsat += int'(gs);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked (fixed point): (0.5 + 0.25i)(0.5 - 0.5i) = 0.375 - 0.125i
    xx = {14'h1000, 14'h0800}; wx = {14'h1000, 14'h3000}; #1;
    checks++;
    if (yx != {14'h0c00, 14'h3c00}) begin failures++; $display("FAIL hand %h", yx); end
    // (-1 - i)(-1 + i) = 2 + 0i: real part saturates
    xx = {14'h2000, 14'h2000}; wx = {14'h2000, 14'h2000 ^ 14'h0000}; #1;
    nsat += int'(sx);
    repeat (10000) begin
      xx = 28'($urandom); wx = 28'($urandom); #1;
      cmp(FX, 14, longint'(xx), longint'(wx), longint'(yx), sx, ux);
      xl = 26'($urandom); wl = 26'($urandom); #1;
      cmp(FL, 13, longint'(xl), longint'(wl), longint'(yl), sl, ul);
    end
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

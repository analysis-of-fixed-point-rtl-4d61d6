// tb_flp_mul: self-checking test of the floating-point multiplier at the
// default format (2-bit encoded exponent, 11-bit mantissa) and at a second
// format (4-bit exponent, 7-bit mantissa).  Random {e, M} operands; result,
// sat and ufl are compared with tb_ref_pkg.  (-1)*(-1) must saturate and
// products of small numbers must underflow gradually.
//
// From the study: the arithmetic rules the expected values are built from.
// The stimulus and checks are this design's own.
module tb_flp_mul;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0, nsat = 0, nufl = 0;

  localparam fmt_t FA = '{flp: 1, wl: 0, ew: 2, mw: 11};
  logic [12:0] a1, b1, y1;
  logic        s1, u1;
  flp_mul #(.EW(2), .MW(11)) dut1 (.a(a1), .b(b1), .y(y1), .sat(s1), .ufl(u1));

  localparam fmt_t FB = '{flp: 1, wl: 0, ew: 4, mw: 7};
  logic [10:0] a2, b2, y2;
  logic        s2, u2;
  flp_mul #(.EW(4), .MW(7)) dut2 (.a(a2), .b(b2), .y(y2), .sat(s2), .ufl(u2));

  task automatic cmp(fmt_t f, longint got, bit gs, bit gu, longint a, longint b);
    longint e;
    bit     xs, xu;
    e = ref_mul(f, a, b, xs, xu);
    checks++;
    if (got != e || gs != xs || gu != xu) begin
      failures++;
      $display("FAIL ew=%0d a=%h b=%h y=%h exp=%h sat=%b/%b ufl=%b/%b", f.ew, a, b, got, e,
               gs, xs, gu, xu);
    end
    nsat += int'(gs);
    nufl += int'(gu);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked: 0.5 * 0.5 = 0.25 -> e=1, M=0.5
    a1 = {2'd0, 11'h200}; b1 = {2'd0, 11'h200}; #1;
    checks++;
    if (y1 != {2'd1, 11'h200}) failures++;
    // -1 * -1 -> saturates to {0, 0x3ff}
    a1 = {2'd0, 11'h400}; b1 = {2'd0, 11'h400}; #1;
    checks++;
    if (y1 != {2'd0, 11'h3ff} || !s1) failures++;
    nsat += int'(s1);
    repeat (20000) begin
      a1 = 13'($urandom); b1 = 13'($urandom); #1;
      cmp(FA, longint'(y1), s1, u1, longint'(a1), longint'(b1));
      a2 = 11'($urandom); b2 = 11'($urandom); #1;
      cmp(FB, longint'(y2), s2, u2, longint'(a2), longint'(b2));
    end
    checks += 2;
    if (nsat == 0) begin failures++; $display("FAIL: no saturation"); end
    if (nufl == 0) begin failures++; $display("FAIL: no gradual underflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_flp_add: self-checking test of the floating-point adder / subtractor at
// the default format (2-bit encoded exponent, 11-bit mantissa) and at a
// second format (3-bit exponent, 8-bit mantissa).  Operands are random
// {e, M} words, normalised or not; each result, sat and ufl flag is compared
// with the real-number reference of tb_ref_pkg.  Saturation and gradual
// underflow must each occur.
//
// From the study: the arithmetic rules the expected values are built from.
// The stimulus and checks are this design's own.
module tb_flp_add;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0, nsat = 0, nufl = 0;

  // default format
  localparam fmt_t FA = '{flp: 1, wl: 0, ew: 2, mw: 11};
  logic [12:0] a1, b1, y1a, y1s;
  logic        s1a, s1s, u1a, u1s;
  flp_add #(.EW(2), .MW(11), .SUB(1'b0)) dut_add1 (.a(a1), .b(b1), .y(y1a), .sat(s1a), .ufl(u1a));
  flp_add #(.EW(2), .MW(11), .SUB(1'b1)) dut_sub1 (.a(a1), .b(b1), .y(y1s), .sat(s1s), .ufl(u1s));

  // second format
  localparam fmt_t FB = '{flp: 1, wl: 0, ew: 3, mw: 8};
  logic [10:0] a2, b2, y2a, y2s;
  logic        s2a, s2s, u2a, u2s;
  flp_add #(.EW(3), .MW(8), .SUB(1'b0)) dut_add2 (.a(a2), .b(b2), .y(y2a), .sat(s2a), .ufl(u2a));
  flp_add #(.EW(3), .MW(8), .SUB(1'b1)) dut_sub2 (.a(a2), .b(b2), .y(y2s), .sat(s2s), .ufl(u2s));

  task automatic cmp(fmt_t f, longint got, bit gs, bit gu, longint a, longint b, bit sub);
    longint e;
    bit     xs, xu;
    e = ref_add(f, a, b, sub, xs, xu);
    checks++;
    if (got != e || gs != xs || gu != xu) begin
      failures++;
      $display("FAIL ew=%0d sub=%0d a=%h b=%h y=%h exp=%h sat=%b/%b ufl=%b/%b", f.ew, sub,
               a, b, got, e, gs, xs, gu, xu);
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
    // hand-worked: 0.5 (e=0) + 0.25 (e=1, M=0.5) = 0.75 -> e=0, M=0.75
    a1 = {2'd0, 11'h200}; b1 = {2'd1, 11'h200}; #1;
    checks++;
    if (y1a != {2'd0, 11'h300}) failures++;
    // 0.5 - 0.5 = 0 -> e=3, M=0
    b1 = a1; #1;
    checks++;
    if (y1s != {2'd3, 11'h000}) failures++;
    repeat (20000) begin
      a1 = 13'($urandom); b1 = 13'($urandom); #1;
      cmp(FA, longint'(y1a), s1a, u1a, longint'(a1), longint'(b1), 0);
      cmp(FA, longint'(y1s), s1s, u1s, longint'(a1), longint'(b1), 1);
      a2 = 11'($urandom); b2 = 11'($urandom); #1;
      cmp(FB, longint'(y2a), s2a, u2a, longint'(a2), longint'(b2), 0);
      cmp(FB, longint'(y2s), s2s, u2s, longint'(a2), longint'(b2), 1);
    end
    checks += 2;
    if (nsat == 0) begin failures++; $display("FAIL: no saturation"); end
    if (nufl == 0) begin failures++; $display("FAIL: no gradual underflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

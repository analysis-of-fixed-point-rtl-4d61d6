// tb_fxp_add: self-checking test of the fixed-point adder and subtractor
// (S0.13).  Random operands plus the corner cases that must saturate; every
// result and sat flag is compared with the real-number reference of
// tb_ref_pkg.  Combinational, so each vector settles for 1 ns.
//
// From the study: the arithmetic rules the expected values are built from.
// The stimulus and checks are this design's own.
module tb_fxp_add;
  import tb_ref_pkg::*;
  localparam int WL = 14;
  localparam fmt_t F = '{flp: 0, wl: WL, ew: 0, mw: 0};

  logic [WL-1:0] a, b, ya, ys;
  logic          sa, ss;
  int            checks = 0, failures = 0, nsat = 0;

  fxp_add #(.WL(WL), .SUB(1'b0)) dut_add (.a(a), .b(b), .y(ya), .sat(sa));
  fxp_add #(.WL(WL), .SUB(1'b1)) dut_sub (.a(a), .b(b), .y(ys), .sat(ss));

  task automatic check_one();
    longint ea, es;
    bit     xsa, xss, u;
    #1;
    ea = ref_add(F, longint'(a), longint'(b), 0, xsa, u);
    es = ref_add(F, longint'(a), longint'(b), 1, xss, u);
    checks += 2;
    if (ya != WL'(ea) || sa != xsa) begin
      failures++;
      $display("FAIL add a=%h b=%h y=%h exp=%h sat=%b/%b", a, b, ya, WL'(ea), sa, xsa);
    end
    if (ys != WL'(es) || ss != xss) begin
      failures++;
      $display("FAIL sub a=%h b=%h y=%h exp=%h sat=%b/%b", a, b, ys, WL'(es), ss, xss);
    end
    nsat += int'(sa) + int'(ss);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // corners: max+max, min+min, min-max, max-min, 0-min, exact values
    static logic [WL-1:0] c[6] = '{14'h1fff, 14'h2000, 14'h0000, 14'h3fff, 14'h0001, 14'h1000};
    foreach (c[i]) foreach (c[j]) begin
      a = c[i]; b = c[j]; check_one();
    end
    // hand-worked: 0.25 + 0.5 = 0.75, 0.25 - 0.5 = -0.25
    a = 14'h0800; b = 14'h1000; #1;
    checks += 2;
    if (ya != 14'h1800) failures++;
    if (ys != 14'h3800) failures++;
    repeat (20000) begin
      a = WL'($urandom); b = WL'($urandom); check_one();
    end
    checks++;
    if (nsat == 0) begin
      failures++;
      $display("FAIL: saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fxp_mul: self-checking test of the fixed-point fractional multiplier
// (S0.13): random operands and corners ((-1)*(-1) saturates, truncation of
// negative products goes toward zero), compared with tb_ref_pkg.
//
// From the study: the arithmetic rules the expected values are built from.
// The stimulus and checks are this design's own.
module tb_fxp_mul;
  import tb_ref_pkg::*;
  localparam int WL = 14;
  localparam fmt_t F = '{flp: 0, wl: WL, ew: 0, mw: 0};

  logic [WL-1:0] a, b, y;
  logic          sat;
  int            checks = 0, failures = 0, nsat = 0;

  fxp_mul #(.WL(WL)) dut (.a(a), .b(b), .y(y), .sat(sat));

  task automatic check_one();
    longint e;
    bit     xs, u;
    #1;
    e = ref_mul(F, longint'(a), longint'(b), xs, u);
    checks++;
    if (y != WL'(e) || sat != xs) begin
      failures++;
      $display("FAIL a=%h b=%h y=%h exp=%h sat=%b/%b", a, b, y, WL'(e), sat, xs);
    end
    nsat += int'(sat);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [WL-1:0] c[6] = '{14'h1fff, 14'h2000, 14'h0000, 14'h3fff, 14'h0001, 14'h1000};
    foreach (c[i]) foreach (c[j]) begin
      a = c[i]; b = c[j]; check_one();
    end
    // hand-worked: 0.5 * -2^-13 = -2^-14 -> truncated toward zero = 0
    a = 14'h1000; b = 14'h3fff; #1;
    checks++;
    if (y != 14'h0000) failures++;
    // -1 * -1 saturates to 1 - 2^-13
    a = 14'h2000; b = 14'h2000; #1;
    checks++;
    if (y != 14'h1fff || !sat) failures++;
    repeat (20000) begin
      a = WL'($urandom); b = WL'($urandom); check_one();
    end
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_twiddle_rom: checks every entry of the 64-point twiddle table in both
// formats against cos/sin quantized by tb_ref_pkg, plus a few hand-worked
// entries (W^16 = -i, W^8 = (1 - i)/sqrt(2)).
//
// From the study: the arithmetic rules the expected values are built from.
// The stimulus and checks are this design's own.
module tb_twiddle_rom;
  import tb_ref_pkg::*;
  import fft_pkg::*;

  localparam fmt_t FX = '{flp: 0, wl: 14, ew: 0, mw: 0};
  localparam fmt_t FL = '{flp: 1, wl: 0, ew: 2, mw: 11};

  int          checks = 0, failures = 0;
  logic [4:0]  k;
  logic [27:0] wx;
  logic [25:0] wl;

  twiddle_rom #(.N(64), .ARITH(ARITH_FXP)) dut_fxp (.k(k), .w(wx));
  twiddle_rom #(.N(64), .ARITH(ARITH_FLP)) dut_flp (.k(k), .w(wl));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint r, i;
    for (int n = 1; n < 32; n++) begin
      k = 5'(n);
      #1;
      ref_twiddle(FX, 64, n, r, i);
      checks++;
      if (wx != 28'((r << 14) | i)) begin
        failures++;
        $display("FAIL fxp k=%0d got %h exp %h", n, wx, (r << 14) | i);
      end
      ref_twiddle(FL, 64, n, r, i);
      checks++;
      if (wl != 26'((r << 13) | i)) begin
        failures++;
        $display("FAIL flp k=%0d got %h exp %h", n, wl, (r << 13) | i);
      end
    end
    // W^16 = 0 - 1i : fixed {0, -1}; floating {e=3 M=0, e=0 M=-1}
    k = 5'd16; #1;
    checks += 2;
    if (wx != {14'h0000, 14'h2000}) failures++;
    if (wl != {2'd3, 11'h000, 2'd0, 11'h400}) failures++;
    // W^8: cos = 0.70710678 -> trunc(0.7071*8192) = 5792 = 0x16a0
    k = 5'd8; #1;
    checks++;
    if (wx != {14'h16a0, 14'(-14'sd5792)}) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

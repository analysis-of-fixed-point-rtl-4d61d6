// tb_fft_mem: self-checking test of the FFT data memory: random writes on
// both write ports (distinct addresses) tracked in a scoreboard array, random
// asynchronous reads on both read ports compared with it.
//
// From the study: the arithmetic rules the expected values are built from.
// The stimulus and checks are this design's own.
module tb_fft_mem;
  localparam int N = 64, W = 14;
  logic            clk = 0;
  logic [5:0]      ra0, ra1, wa0, wa1;
  logic [2*W-1:0]  rd0, rd1, wd0, wd1;
  logic            we0, we1;
  logic [2*W-1:0]  model [N];
  bit              known [N];
  int              checks = 0, failures = 0;

  fft_mem #(.N(N), .W(W)) dut (
    .clk(clk), .raddr0(ra0), .raddr1(ra1), .rdata0(rd0), .rdata1(rd1),
    .we0(we0), .waddr0(wa0), .wdata0(wd0), .we1(we1), .waddr1(wa1), .wdata1(wd1));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we0 = 0; we1 = 0; ra0 = 0; ra1 = 0; wa0 = 0; wa1 = 1; wd0 = 0; wd1 = 0;
    foreach (known[i]) known[i] = 0;
    repeat (3000) begin
      @(negedge clk);
      // check reads of the current contents
      ra0 = 6'($urandom); ra1 = 6'($urandom);
      #1;
      if (known[ra0]) begin checks++; if (rd0 != model[ra0]) failures++; end
      if (known[ra1]) begin checks++; if (rd1 != model[ra1]) failures++; end
      we0 = 1'($urandom); we1 = 1'($urandom);
      wa0 = 6'($urandom); wa1 = wa0 ^ 6'(1 + $urandom_range(0, 62));
      wd0 = 28'($urandom); wd1 = 28'($urandom);
      @(posedge clk);
      #1;
      if (we0) begin model[wa0] = wd0; known[wa0] = 1; end
      if (we1) begin model[wa1] = wd1; known[wa1] = 1; end
      we0 = 0; we1 = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

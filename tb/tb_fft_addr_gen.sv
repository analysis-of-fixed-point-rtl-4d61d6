// tb_fft_addr_gen: checks the butterfly address sequence of the 64-point
// in-place DIT FFT against a textbook triple loop (stage, group, position),
// that exactly N/2*log2(N) = 192 butterflies are issued, that done marks the
// last one and that a start during a run is ignored.
//
// From the study: the arithmetic rules the expected values are built from.
// The stimulus and checks are this design's own.
module tb_fft_addr_gen;
  localparam int N = 64;
  logic       clk = 0, rst_n = 0, start = 0;
  logic       active, done;
  logic [5:0] a0, a1;
  logic [4:0] tw;
  int         checks = 0, failures = 0;

  fft_addr_gen #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .active(active), .addr0(a0), .addr1(a1),
    .tw_idx(tw), .done(done));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, ndone;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk);
      checks++;
      if (active) failures++;
      start = 1;
      @(negedge clk);
      start = (run == 1);  // second run: start held high during the run
      cycles = 0;
      ndone  = 0;
      for (int span = 1; span < N; span *= 2) begin
        for (int base = 0; base < N; base += 2 * span) begin
          for (int j = 0; j < span; j++) begin
            checks++;
            if (!active || a0 != 6'(base + j) || a1 != 6'(base + j + span) ||
                tw != 5'(j * (N / (2 * span)))) begin
              failures++;
              $display("FAIL span=%0d base=%0d j=%0d a0=%0d a1=%0d tw=%0d", span, base, j,
                       a0, a1, tw);
            end
            ndone += int'(done);
            checks++;
            if (done != (span == N / 2 && base + 2 * span >= N && j == span - 1)) failures++;
            cycles++;
            @(negedge clk);
          end
        end
      end
      start = 0;
      checks += 2;
      if (cycles != 192 || ndone != 1) failures++;
      if (active) begin
        failures++;
        $display("FAIL still active after 192 cycles");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

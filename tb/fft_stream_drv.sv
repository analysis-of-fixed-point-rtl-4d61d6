// fft_stream_drv: testbench driver and checker for one FFT core's streaming
// ports (see fft_core), used by tb_fft_core and tb_fft_top.
//
// A producer process generates NT transforms, quantizes them to the core's
// format, computes the expected output with the reference FFT of tb_ref_pkg
// and pushes it to a queue, then feeds the samples with random valid gaps.
// It starts on the next transform at once, so it stalls against in_ready
// while the core computes.  A consumer process takes the bins with a random
// out_ready, compares them bit for bit, checks out_last, the sat/ufl status
// flags and the compute latency: exactly N/2*log2(N) clocks from the last
// accepted sample to the first valid output.
// Transform kinds: t % 4 == 1 is overdriven (input up to 0.9 of full range,
// forcing saturation), t % 4 == 3 is tiny (2^-9 of the usual level, forcing
// gradual underflow in floating point); the others are Gaussian noise with
// sigma 0.02, clipped at 0.09 (9 % of full range), and are used for the
// signal-to-quantization-noise ratio.  sqnr_db compares with a double
// precision DFT of the unquantized input; sqnr_q_db compares with the double
// precision DFT of the quantized input, its output quantized to the same
// format (a reference that shares the input and output rounding).
//
// From the study: Gaussian input peaking at 9 % of full range, SQNR against an
// unquantized reference, 192-clock latency.  Handshake stalls, overdriven and
// tiny transforms and the flag checks are this design's own.
module fft_stream_drv
  import tb_ref_pkg::*;
#(
  parameter int N    = 64,
  parameter bit FLP  = 0,
  parameter int WL   = 14,
  parameter int EW   = 2,
  parameter int MW   = 11,
  parameter int NT   = 8,
  localparam int W   = FLP ? EW + MW : WL
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic           in_valid,
  input  logic           in_ready,
  output logic [2*W-1:0] in_data,
  input  logic           out_valid,
  output logic           out_ready,
  input  logic [2*W-1:0] out_data,
  input  logic           out_last,
  input  logic           sat_seen,
  input  logic           ufl_seen,
  output logic           finished,
  output int             checks,
  output int             failures,
  output int             n_in_stall,
  output int             n_out_stall,
  output int             n_sat,
  output int             n_ufl,
  output real            sqnr_db,
  output real            sqnr_q_db
);
  localparam fmt_t F = '{flp: FLP, wl: WL, ew: EW, mw: MW};
  localparam int LAT = N / 2 * $clog2(N);

  typedef struct {
    longint yr[];
    longint yi[];
    real    dr[];
    real    di[];
    real    rr[];
    real    ri[];
    bit     sat;
    bit     ufl;
    bit     gauss;
  } exp_t;

  exp_t   expq[$];
  longint cyc = 0;
  longint last_in_cyc[$];
  real    psig = 0.0, perr = 0.0, perr_q = 0.0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && in_valid && !in_ready) n_in_stall <= n_in_stall + 1;
    if (rst_n && out_valid && !out_ready) n_out_stall <= n_out_stall + 1;
  end

  initial begin
    in_valid    = 0;
    in_data     = '0;
    n_in_stall  = 0;
    n_out_stall = 0;
    @(posedge rst_n);
    @(posedge clk);
    #1;
    for (int t = 0; t < NT; t++) begin
      real    xr[], xi[], dr[], di[], vr[], vi[], rr[], ri[], sc;
      longint qr[], qi[];
      exp_t   e;
      bit     s, u, acc;
      xr = new[N]; xi = new[N]; qr = new[N]; qi = new[N];
      for (int i = 0; i < N; i++) begin
        case (t % 4)
          1: begin
            xr[i] = 0.9 * (2.0 * real'($urandom) / 4294967296.0 - 1.0);
            xi[i] = 0.9 * (2.0 * real'($urandom) / 4294967296.0 - 1.0);
          end
          3: begin
            xr[i] = 0.02 / 512.0 * randn();
            xi[i] = 0.02 / 512.0 * randn();
          end
          default: begin
            xr[i] = 0.02 * randn();
            xi[i] = 0.02 * randn();
            if (xr[i] > 0.09) xr[i] = 0.09;
            if (xr[i] < -0.09) xr[i] = -0.09;
            if (xi[i] > 0.09) xi[i] = 0.09;
            if (xi[i] < -0.09) xi[i] = -0.09;
          end
        endcase
        qr[i] = q0(F, xr[i]);
        qi[i] = q0(F, xi[i]);
      end
      e.gauss = (t % 2 == 0);
      dft(N, xr, xi, dr, di);
      vr = new[N];
      vi = new[N];
      for (int i = 0; i < N; i++) begin
        vr[i] = val(F, qr[i]);
        vi[i] = val(F, qi[i]);
      end
      dft(N, vr, vi, rr, ri);
      for (int i = 0; i < N; i++) begin
        rr[i] = val(F, q0(F, rr[i]));
        ri[i] = val(F, q0(F, ri[i]));
      end
      e.rr = rr;
      e.ri = ri;
      e.dr = dr;
      e.di = di;
      e.yr = qr;
      e.yi = qi;
      ref_fft(F, N, e.yr, e.yi, s, u);
      e.sat = s;
      e.ufl = u;
      expq.push_back(e);
      for (int i = 0; i < N; i++) begin
        while ($urandom_range(0, 3) == 0) begin
          in_valid = 0;
          @(posedge clk);
          #1;
        end
        in_valid = 1;
        in_data  = (2*W)'((qr[i] << W) | qi[i]);
        acc = 0;
        while (!acc) begin
          acc = in_ready;
          @(posedge clk);
          #1;
        end
        if (i == N - 1) last_in_cyc.push_back(cyc);
      end
    end
    in_valid = 0;
  end

  initial begin
    finished  = 0;
    checks    = 0;
    failures  = 0;
    n_sat     = 0;
    n_ufl     = 0;
    sqnr_db   = 0.0;
    sqnr_q_db = 0.0;
    out_ready = 0;
    @(posedge rst_n);
    @(posedge clk);
    #1;
    for (int t = 0; t < NT; t++) begin
      exp_t   e;
      longint first_cyc, gr, gi;
      int     k;
      bit     fire, last;
      while (!out_valid) begin
        @(posedge clk);
        #1;
      end
      first_cyc = cyc;
      while (expq.size() == 0 || last_in_cyc.size() == 0) begin
        @(posedge clk);
        #1;
      end
      e = expq.pop_front();
      checks++;
      if (first_cyc - last_in_cyc[0] != longint'(LAT)) begin
        failures++;
        $display("FAIL flp=%0d transform %0d: latency %0d, expected %0d", FLP, t,
                 first_cyc - last_in_cyc[0], LAT);
      end
      void'(last_in_cyc.pop_front());
      k = 0;
      while (k < N) begin
        out_ready = ($urandom_range(0, 3) != 0);
        fire      = out_valid && out_ready;
        gr        = longint'(out_data[2*W-1:W]);
        gi        = longint'(out_data[W-1:0]);
        last      = out_last;
        @(posedge clk);
        #1;
        if (fire) begin
          checks += 2;
          if (gr != e.yr[k] || gi != e.yi[k]) begin
            failures++;
            if (failures < 10)
              $display("FAIL flp=%0d transform %0d bin %0d: got %h %h exp %h %h", FLP, t, k,
                       gr, gi, e.yr[k], e.yi[k]);
          end
          if (last != (k == N - 1)) failures++;
          if (e.gauss) begin
            psig += e.dr[k] ** 2 + e.di[k] ** 2;
            perr += (val(F, gr) - e.dr[k]) ** 2 + (val(F, gi) - e.di[k]) ** 2;
            perr_q += (val(F, gr) - e.rr[k]) ** 2 + (val(F, gi) - e.ri[k]) ** 2;
          end
          if (k == N - 1) begin
            checks += 2;
            if (sat_seen != e.sat || ufl_seen != (FLP ? e.ufl : 1'b0)) begin
              failures++;
              $display("FAIL flp=%0d transform %0d flags sat %b/%b ufl %b/%b", FLP, t,
                       sat_seen, e.sat, ufl_seen, e.ufl);
            end
            // Inputs peaking at 9 % of full range must leave enough headroom.
            checks++;
            if (e.gauss && sat_seen) begin
              failures++;
              $display("FAIL flp=%0d transform %0d: Gaussian input saturated", FLP, t);
            end
            n_sat += int'(sat_seen);
            n_ufl += int'(ufl_seen);
          end
          k++;
        end
      end
      out_ready = 0;
    end
    if (perr > 0.0) sqnr_db = 10.0 * $log10(psig / perr);
    if (perr_q > 0.0) sqnr_q_db = 10.0 * $log10(psig / perr_q);
    finished = 1;
  end
endmodule

// fft_core: memory-based (iterative) N-point radix-2 decimation-in-time FFT
// with one butterfly, in the number format chosen by ARITH.
//
// Operation, one transform at a time:
//   LOAD     in_ready = 1.  N complex samples {re, im} are accepted with a
//            valid/ready handshake and written to the bit-reversed address
//            of their index.
//   COMPUTE  starts the cycle after the last sample is accepted.  The address
//            counter issues one butterfly per clock; it reads two words,
//            multiplies the second by the twiddle factor (skipped for twiddle
//            index 0), adds and subtracts, and writes both results back in
//            place.  log2(N) stages of N/2 butterflies take N/2*log2(N)
//            clocks (192 for N = 64).  No input is accepted meanwhile.
//   UNLOAD   out_valid = 1.  The N bins are presented in natural order with a
//            valid/ready handshake; out_last marks bin N-1.  Then LOAD again.
// Every operation keeps the word length, truncating toward zero and
// saturating, so the input needs headroom for the growth through log2(N)
// stages.  sat_seen / ufl_seen report whether any operator saturated or
// (floating point only) underflowed gradually during the transform being
// unloaded; they are cleared when the next transform starts computing.
// Synchronous active-low reset; the memory is not written while reset is held.
//
// From the study: the memory-based one-butterfly architecture, N = 64, fixed
// word length and 192-clock compute time.  The handshakes, phases, flags and
// reset are this design's own.
module fft_core
  import fft_pkg::*;
#(
  parameter int     N      = 64,
  parameter arith_e ARITH  = ARITH_FXP,
  parameter int     FXP_WL = 14,
  parameter int     FLP_EW = 2,
  parameter int     FLP_MW = 11,
  localparam int    W      = word_w(ARITH, FXP_WL, FLP_EW, FLP_MW),
  localparam int    AW     = $clog2(N)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [2*W-1:0] in_data,
  output logic           out_valid,
  input  logic           out_ready,
  output logic [2*W-1:0] out_data,
  output logic           out_last,
  output logic           sat_seen,
  output logic           ufl_seen
);
  typedef enum logic [1:0] {
    S_LOAD    = 2'd0,
    S_COMPUTE = 2'd1,
    S_UNLOAD  = 2'd2
  } state_e;

  state_e          state;
  logic [AW-1:0]   cnt;
  logic [AW-1:0]   cnt_rev;
  logic            start;

  logic            bf_active, bf_done;
  logic [AW-1:0]   bf_addr0, bf_addr1;
  logic [AW-2:0]   tw_idx;
  logic [2*W-1:0]  tw;

  logic [AW-1:0]   raddr0, raddr1, waddr0;
  logic [2*W-1:0]  rdata0, rdata1, wdata0, y0, y1;
  logic            we0, we1;
  logic            bf_sat, bf_ufl;

  logic            in_fire, out_fire;

  assign in_ready  = (state == S_LOAD);
  assign in_fire   = in_valid && in_ready;
  assign out_valid = (state == S_UNLOAD);
  assign out_fire  = out_valid && out_ready;
  assign start     = in_fire && (cnt == AW'(N - 1));

  always_comb begin
    for (int i = 0; i < AW; i++) cnt_rev[i] = cnt[AW-1-i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_LOAD;
      cnt      <= '0;
      sat_seen <= 1'b0;
      ufl_seen <= 1'b0;
    end else begin
      unique case (state)
        S_LOAD: if (in_fire) begin
          cnt <= cnt + 1'b1;
          if (start) begin
            state    <= S_COMPUTE;
            sat_seen <= 1'b0;
            ufl_seen <= 1'b0;
          end
        end
        S_COMPUTE: begin
          if (bf_active) begin
            sat_seen <= sat_seen | bf_sat;
            ufl_seen <= ufl_seen | bf_ufl;
          end
          if (bf_done) state <= S_UNLOAD;
        end
        S_UNLOAD: if (out_fire) begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  fft_addr_gen #(.N(N)) u_agen (
    .clk(clk), .rst_n(rst_n), .start(start), .active(bf_active),
    .addr0(bf_addr0), .addr1(bf_addr1), .tw_idx(tw_idx),
    .done(bf_done)
  );

  twiddle_rom #(.N(N), .ARITH(ARITH), .FXP_WL(FXP_WL), .FLP_EW(FLP_EW), .FLP_MW(FLP_MW)) u_rom (
    .k(tw_idx), .w(tw)
  );

  butterfly #(.ARITH(ARITH), .FXP_WL(FXP_WL), .FLP_EW(FLP_EW), .FLP_MW(FLP_MW)) u_bf (
    .x0(rdata0), .x1(rdata1), .w(tw), .w_bypass(tw_idx == '0),
    .y0(y0), .y1(y1), .sat(bf_sat), .ufl(bf_ufl)
  );

  assign raddr0 = (state == S_COMPUTE) ? bf_addr0 : cnt;
  assign raddr1 = bf_addr1;
  assign we0    = rst_n && (in_fire || (state == S_COMPUTE && bf_active));
  assign waddr0 = (state == S_LOAD) ? cnt_rev : bf_addr0;
  assign wdata0 = (state == S_LOAD) ? in_data : y0;
  assign we1    = rst_n && (state == S_COMPUTE) && bf_active;

  fft_mem #(.N(N), .W(W)) u_mem (
    .clk(clk),
    .raddr0(raddr0), .raddr1(raddr1), .rdata0(rdata0), .rdata1(rdata1),
    .we0(we0), .waddr0(waddr0), .wdata0(wdata0),
    .we1(we1), .waddr1(bf_addr1), .wdata1(y1)
  );

  assign out_data = rdata0;
  assign out_last = out_valid && (cnt == AW'(N - 1));

endmodule

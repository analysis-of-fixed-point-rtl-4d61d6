// fft_addr_gen: address counter of the memory-based radix-2 DIT FFT.
//
// After a start pulse it counts log2(N) stages of N/2 butterflies, one
// butterfly per clock, N/2*log2(N) cycles in all (192 for N = 64).  For stage
// s and butterfly j (half = 2^s):
//   addr0  = (j / half) * 2 * half + (j mod half)
//   addr1  = addr0 + half
//   tw_idx = (j mod half) * N / (2 * half)
// With the input stored in bit-reversed order these in-place addresses leave
// the result in natural order.  active is high while a butterfly is issued;
// done marks the last one.  A start while active is ignored.  Synchronous
// active-low reset.
//
// From the study: in-place stage-by-stage schedule, one butterfly per clock.
// The counter formulation is this design's own.
module fft_addr_gen #(
  parameter int  N  = 64,
  localparam int AW = $clog2(N),
  localparam int KW = AW - 1,
  localparam int SW = $clog2(AW)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          active,
  output logic [AW-1:0] addr0,
  output logic [AW-1:0] addr1,
  output logic [KW-1:0] tw_idx,
  output logic          done
);
  logic [SW-1:0] stage;
  logic [KW-1:0] j;
  logic [KW-1:0] lo_mask;
  logic [KW-1:0] pos;
  logic [KW-1:0] grp;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      stage  <= '0;
      j      <= '0;
    end else if (!active) begin
      if (start) begin
        active <= 1'b1;
        stage  <= '0;
        j      <= '0;
      end
    end else begin
      j <= j + 1'b1;
      if (j == KW'(N / 2 - 1)) begin
        if (stage == SW'(AW - 1)) active <= 1'b0;
        else                      stage  <= stage + 1'b1;
      end
    end
  end

  assign lo_mask = KW'((1 << stage) - 1);
  assign pos     = j & lo_mask;
  assign grp     = j & ~lo_mask;
  assign addr0   = {grp, 1'b0} | AW'(pos);
  assign addr1   = addr0 | (AW'(1) << stage);
  assign tw_idx  = KW'(pos << (SW'(AW - 1) - stage));
  assign done    = active && (j == KW'(N / 2 - 1)) && (stage == SW'(AW - 1));

endmodule

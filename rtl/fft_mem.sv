// fft_mem: data memory of the memory-based FFT, N complex words of 2*W bits
// (N times two real words).
//
// The butterfly works in place: each clock it reads two words (raddr0,
// raddr1, asynchronous read) and writes its two results back to the same
// addresses on the next rising edge (we0/we1, synchronous write).  Port 0 is
// also used to load input samples and to read out the result.  The two write
// addresses are never equal when both enables are set (asserted).  Contents
// are not reset.
//
// From the study: one N-word data memory.  The register array with two read and
// two write ports is this design's own; a memory macro could replace it.
module fft_mem #(
  parameter int  N  = 64,
  parameter int  W  = 14,
  localparam int AW = $clog2(N)
) (
  input  logic           clk,
  input  logic [AW-1:0]  raddr0,
  input  logic [AW-1:0]  raddr1,
  output logic [2*W-1:0] rdata0,
  output logic [2*W-1:0] rdata1,
  input  logic           we0,
  input  logic [AW-1:0]  waddr0,
  input  logic [2*W-1:0] wdata0,
  input  logic           we1,
  input  logic [AW-1:0]  waddr1,
  input  logic [2*W-1:0] wdata1
);
  logic [2*W-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (we0) mem[waddr0] <= wdata0;
    if (we1) mem[waddr1] <= wdata1;
  end

  assign rdata0 = mem[raddr0];
  assign rdata1 = mem[raddr1];

  a_no_write_clash: assert property (@(posedge clk) !(we0 && we1 && waddr0 == waddr1));

endmodule

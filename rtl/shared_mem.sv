// shared_mem: the shared data memory of the processor (MEM).
//
// A single-port-read, single-port-write synchronous memory of DEPTH words of
// WM bits, written as an array so that synthesis maps it to an SRAM macro.
// A field element of up to W bits occupies ceil(W/WM) consecutive words. The
// read has one cycle of latency (rdata is valid the cycle after re), the
// intrinsic SRAM read latency that the memory hierarchy hides with its w-bit
// buffer. The memory holds no reset; every word is written before it is read.
// The paper gives the memory's role and its entry list (a, Q0, Q1, Q2, QT, M,
// N and two temporaries); the organisation is this design's.
module shared_mem #(
  parameter int unsigned WM    = 80,        // data width w of the shared memory
  parameter int unsigned DEPTH = 64,        // number of words
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [WM-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [WM-1:0] rdata
);
  logic [WM-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule

// column_memory: the N information bits of one top-level column of H1.
//
// The encoder keeps one such memory per top-level column, which is the
// highest-parallelism arrangement: every top-level row uses each column at
// most once, so all the bits of one parity check are read in the same
// cycle, one from each memory taking part.
//
// Interface: one write port (we, waddr, wdata) used while a frame is
// loaded, one read port (re, raddr) with a registered output `rdata`
// valid the cycle after `re`. A 1-bit wide array with synchronous read, so
// it maps to a RAM. The contents are not reset. One memory per column is
// the construction's most parallel option; width, ports and read latency
// are this design's choices.
module column_memory #(
  parameter int N  = 41,
  parameter int AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic          rdata
);

  logic mem [N];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule

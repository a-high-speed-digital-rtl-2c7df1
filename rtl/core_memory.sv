// core_memory -- model of a region of the analyzer's core memory.
//
// A word-addressed store of 2^AW words of DW bits with one read and one
// write access per clock.  A read returns the addressed word on the next
// clock (the value before any write to the same address in the same
// clock), which lets a client do a read-modify-write of one word per clock
// by writing back the word it read one clock earlier.  The analyzer uses
// one region for raw input samples (8192 complex 16-bit words) and one for
// the postprocessing filter bins (8192 words of 18 bits).  The document has
// both share a single core memory; giving each region its own access path
// is this design's choice.  The store is not cleared by reset.
module core_memory #(
  parameter int unsigned AW = 13,
  parameter int unsigned DW = 18
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);
  logic [DW-1:0] mem [1 << AW];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end
endmodule

// seg_shift_reg -- circulating shift register B with a switched segment
// boundary, used in place of a long variable delay.
//
// The register is DEPTH words long and shifts on every clock: a word that
// enters on din leaves on dout DEPTH clocks later.  For reorder distances
// too long for the variable delay the register is also used as that delay.
// It is thought of as a chain of segments of DEPTH/2, DEPTH/4, ... words,
// and a switch can break the chain at the boundary that lies tap_len words
// behind the input.
//   tap_q   is the word that entered tap_len clocks ago (now at that
//           boundary);
//   tap_we  replaces that word with tap_din.  The old word leaves on tap_q
//           in the same clock, so it goes elsewhere and the new word takes
//           its place in the chain.
// In this design the chain is modelled as a circular memory with a
// free-running position counter.  "tap_len words behind the input" is then
// the address tap_len below the write address.  This holds any power-of-two
// tap_len below DEPTH, so it covers every segment boundary.
//
// Timing: dout(t) = din(t - DEPTH).  A word written through the tap at
// time t leaves dout at t - tap_len + DEPTH.  tap_len must be 1..DEPTH-1.
// The use of the B register with extra switching as the long delay follows
// the document.  The memory model and the port names are this design's.
module seg_shift_reg #(
  parameter int unsigned W     = 26,
  parameter int unsigned DEPTH = 2048
) (
  input  logic                   clk,
  input  logic [W-1:0]           din,
  output logic [W-1:0]           dout,
  input  logic [$clog2(DEPTH)-1:0] tap_len,
  input  logic                   tap_we,
  input  logic [W-1:0]           tap_din,
  output logic [W-1:0]           tap_q
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;   // free running; its start value does not matter
  logic [AW-1:0] tap_addr;

  assign tap_addr = ptr - tap_len;

  always_ff @(posedge clk) begin
    mem[ptr] <= din;
    if (tap_we) mem[tap_addr] <= tap_din;
    ptr <= ptr + 1'b1;
  end

  assign dout  = mem[ptr];        // written DEPTH clocks ago
  assign tap_q = mem[tap_addr];

  if (DEPTH != (1 << AW)) begin : g_bad_depth
    $error("seg_shift_reg: DEPTH must be a power of two");
  end
endmodule

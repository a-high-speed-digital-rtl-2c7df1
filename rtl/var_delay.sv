// var_delay -- digitally controlled variable delay.
//
// Delays a stream of words by len clocks, 1 <= len <= DEPTH.  The delay is
// a circular store written every clock at a rotating pointer; the output is
// read len places behind the pointer, so it behaves as a shift register
// whose length is chosen by len.  The FFT uses two of them, of DEPTH 64:
// one on the B' output of the arithmetic unit and one in front of shift
// register A.  It also uses one at fixed length N/2 as shift register A.
// As in the document, the variable shift register handles reorder delays
// of 1 to 64; longer ones go through the switched register B
// (seg_shift_reg).  The circular-store structure is this design's choice.
//
// Timing: the word presented with clock edge t appears at dout during
// cycle t+len.  DEPTH must be a power of two.
module var_delay #(
  parameter int unsigned W     = 26,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH):0]   len,
  input  logic [W-1:0]             din,
  output logic [W-1:0]             dout
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;   // free running; its start value does not matter

  always_ff @(posedge clk) begin
    mem[ptr] <= din;
    ptr      <= ptr + 1'b1;
  end

  // The slot written len clocks ago; len = DEPTH reads the slot about to
  // be overwritten.
  assign dout = mem[ptr - len[AW-1:0]];

  if (DEPTH != (1 << AW)) begin : g_bad_depth
    $error("var_delay: DEPTH must be a power of two");
  end
endmodule

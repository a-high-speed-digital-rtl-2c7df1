// hanning_weight -- optional Hanning weighting of samples as they are loaded.
//
// Multiplies each complex sample x_n by w_n = 1/2 - 1/2 cos(2 pi q / N),
// where q is the sample's position within its own data set.  With M = 2^m
// interlaced channels (N = 4096/M points per set) sample n belongs to set
// n mod M at position q = n / M, so the angle in binary angle measure
// (4096 per turn) is simply n with its m low bits cleared.  The cosine comes
// from a sine-cosine generator of the same kind as the FFT's; the weight is
// (4096 - cos) / 8192 and the product is rounded to 13 bits.
// The document names the weighting function and says it is applied while
// the shift registers are loaded; the datapath here is this design's own.
//
// Timing: LAT = 4 clocks, one sample per clock; with enable low the sample
// passes through unchanged with the same latency.
module hanning_weight
  import dfa_pkg::*;
#(
  parameter int unsigned LOG2N = LOG2N_MAX
) (
  input  logic             clk,
  input  logic             enable,
  input  logic [3:0]       log2n,     // points per set
  input  logic [LOG2N-1:0] idx,       // sample number within the block
  input  cplx_t            din,
  output cplx_t            dout
);
  logic [LOG2N-1:0] q_mask;
  logic [11:0]      angle;
  always_comb begin
    q_mask = ~((LOG2N'(1) << (4'(LOG2N) - log2n)) - 1'b1);
    angle  = 12'(idx & q_mask) << (12 - LOG2N);
  end

  sample_t c, s_unused;
  sincos_gen u_trig (.clk, .angle, .cos_o(c), .sin_o(s_unused));

  cplx_t x_d [3];
  logic  en_d [3];
  always_ff @(posedge clk) begin
    x_d[0] <= din;    en_d[0] <= enable;
    x_d[1] <= x_d[0]; en_d[1] <= en_d[0];
    x_d[2] <= x_d[1]; en_d[2] <= en_d[1];
  end

  function automatic sample_t wmul(input sample_t x, input sample_t cs);
    logic signed [13:0] w;            // 0 .. 8192
    logic signed [27:0] p;
    w = 14'sd4096 - 14'(cs);
    p = 28'(x) * 28'(w);
    return sat13((32'(p) + 32'sd4096) >>> 13);
  endfunction

  always_ff @(posedge clk) begin
    if (en_d[2]) begin
      dout.re <= wmul(x_d[2].re, c);
      dout.im <= wmul(x_d[2].im, c);
    end else begin
      dout <= x_d[2];
    end
  end

  logic unused;
  assign unused = ^s_unused;

endmodule

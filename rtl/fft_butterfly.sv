// fft_butterfly -- pipelined arithmetic unit of the FFT.
//
// Computes the two-point transform of Eq. (4) in rectangular coordinates:
//     A' = (A + B*W) / 2^scale,   B' = (A - B*W) / 2^scale,
// with W = cos(theta) - j sin(theta) = exp(-j theta).  The rotation B*W uses
// four real multipliers (Br*c, Bi*s, Bi*c, Br*s), as in the document; here
// they are 13x13 two's complement multipliers rather than 12x12 magnitude
// multipliers with the signs handled outside.  scale is the block-scaling
// bit of the current pass: when set, both outputs are halved so that the
// whole array keeps the same exponent.  Results are rounded (half up) and
// saturated to 13 bits.
//
// Timing: fully pipelined, one butterfly per clock, results 3 clocks after
// the operands (stage 1 products, stage 2 sums, stage 3 round/saturate).
module fft_butterfly
  import dfa_pkg::*;
(
  input  logic    clk,
  input  cplx_t   a,
  input  cplx_t   b,
  input  sample_t wc,      // cos(theta), 1.0 = 4096
  input  sample_t ws,      // sin(theta)
  input  logic    scale,
  output cplx_t   a_o,
  output cplx_t   b_o
);

  // ---- stage 1: the four products
  logic signed [25:0] p_rc, p_is, p_ic, p_rs;
  cplx_t a1;
  logic  sc1;
  always_ff @(posedge clk) begin
    p_rc <= b.re * wc;
    p_is <= b.im * ws;
    p_ic <= b.im * wc;
    p_rs <= b.re * ws;
    a1   <= a;
    sc1  <= scale;
  end

  // ---- stage 2: rotate and add/subtract, kept at 12 fraction bits
  logic signed [27:0] ar_p, ai_p, br_p, bi_p;
  logic sc2;
  always_ff @(posedge clk) begin
    ar_p <= (28'(a1.re) <<< 12) + (28'(p_rc) + 28'(p_is));
    ai_p <= (28'(a1.im) <<< 12) + (28'(p_ic) - 28'(p_rs));
    br_p <= (28'(a1.re) <<< 12) - (28'(p_rc) + 28'(p_is));
    bi_p <= (28'(a1.im) <<< 12) - (28'(p_ic) - 28'(p_rs));
    sc2  <= sc1;
  end

  // ---- stage 3: scale, round, saturate
  function automatic sample_t rnd(input logic signed [27:0] v, input logic sc);
    logic signed [31:0] w;
    w = sc ? ((32'(v) + 32'sd4096) >>> 13) : ((32'(v) + 32'sd2048) >>> 12);
    return sat13(w);
  endfunction

  always_ff @(posedge clk) begin
    a_o.re <= rnd(ar_p, sc2);
    a_o.im <= rnd(ai_p, sc2);
    b_o.re <= rnd(br_p, sc2);
    b_o.im <= rnd(bi_p, sc2);
  end

endmodule

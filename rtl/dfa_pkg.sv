// dfa_pkg -- types and constants shared by the digital Fourier analyzer.
//
// The analyzer transforms blocks of up to 4096 complex samples with a
// shift-register FFT.  Data words are complex, 13 bits per component
// (26 bits per word), two's complement, full scale +/-4096.  Twiddle
// factors are 13-bit cosine/sine pairs scaled so that 1.0 = 4096 and
// saturated to 4095.  The 40-bit control register layout and the floating
// point formats of the postprocessing unit are defined here as well.
package dfa_pkg;

  localparam int unsigned LOG2N_MAX = 12;             // 4096-point array
  localparam int unsigned NMAX      = 1 << LOG2N_MAX;
  localparam int unsigned DW        = 13;             // bits per component
  localparam int unsigned TW        = 13;             // twiddle bits
  localparam int unsigned EXPW      = 5;              // block exponent bits
  localparam int unsigned PWRW      = 24;             // bits of one square
  localparam int unsigned CTRLW     = 40;             // control register

  // Floating point formats of the postprocessing unit.
  localparam int unsigned FEXPW  = 6;                 // characteristic
  localparam int unsigned PFRACW = 5;                 // raw power fraction
  localparam int unsigned FFRACW = 12;                // filter fraction (5+7)
  localparam int unsigned FWORDW = FEXPW + FFRACW;    // 18-bit filter word

  typedef logic signed [DW-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef struct packed {
    logic [FEXPW-1:0]  e;   // 0 means the value is zero
    logic [FFRACW-1:0] f;   // fraction below the hidden leading one
  } fword_t;

  typedef enum logic [1:0] {
    PP_BYPASS    = 2'd0,   // store raw power, no averaging
    PP_INTEGRATE = 2'd1,   // P(i) = p(i) + P(i-1)
    PP_FILTER    = 2'd2    // P(i) = p(i) + (1 - 2^-k) P(i-1)
  } pp_mode_e;

  // 40-bit control register.  Bits 39:13 are spare.
  typedef struct packed {
    logic [26:0] spare;
    logic        bank;      // 12: which half of the filter bins is updated
    logic        run;       // 11: process blocks as they arrive
    logic        cplx_in;   // 10: complex input (else the Q converter is ignored)
    pp_mode_e    pp_mode;   // 9:8
    logic [2:0]  k;         // 7:5 filter constant K = 1 - 2^-k
    logic        hanning;   // 4: Hanning weighting on load
    logic [3:0]  log2n;     // 3:0 points per set N = 2^log2n, M = 4096/N sets
  } ctrl_t;

  function automatic logic [LOG2N_MAX-1:0] bitrev12(input logic [LOG2N_MAX-1:0] a);
    for (int i = 0; i < int'(LOG2N_MAX); i++) bitrev12[i] = a[LOG2N_MAX-1-i];
  endfunction

  function automatic sample_t sat13(input logic signed [31:0] v);
    if (v > 32'sd4095)       return sample_t'(13'sd4095);
    else if (v < -32'sd4096) return sample_t'(-13'sd4096);
    else                     return sample_t'(v);
  endfunction

endpackage

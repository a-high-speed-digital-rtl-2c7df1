// postproc_unit -- floating point power conversion and recursive filtering
// of the spectrum bins.
//
// For every frequency bin it (1) adds the two squares from the FFT and
// converts the power, with the block exponent e (power = (re2 + im2) * 4^e),
// to floating point: a 6-bit characteristic E and 5 fraction bits below a
// hidden leading one, value = 1.f * 2^(E-1), E = 0 meaning zero; (2) reads
// the bin's previous filter value from core; (3) forms
//     P(i) = p(i) + K * P(i-1)
// with K = 1 - 2^-k (k = 0..7) in filter mode, K = 1 in integrate mode and
// K = 0 in bypass mode or for the first set after a restart; and (4) writes
// P(i) back to the same core word.  Filter values carry 12 fraction bits,
// the 5 accuracy bits plus 7 for the integration gain of up to 2^7.
// K*P is formed as P - P/2^k by a shift and a subtraction; the two terms
// are aligned by shifting the smaller one, and a term more than 15 octaves
// below the other is dropped (the bound on the ratio of the two signals,
// reported on drop).  Results beyond E = 63 saturate (reported on clip).
// Steps, formats and K follow the document; the rounding (truncation), the
// zero code, the exact ratio bound and the saturation are this design's.
//
// Timing: one bin per clock.  The core read is issued with in_valid; the
// write-back of the same bin happens one clock later.
module postproc_unit
  import dfa_pkg::*;
#(
  parameter int unsigned AW = 13
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [AW-1:0]   in_addr,
  input  logic [PWRW-1:0] in_re2,
  input  logic [PWRW-1:0] in_im2,
  input  logic [EXPW-1:0] in_exp,
  input  pp_mode_e        mode,
  input  logic [2:0]      k,
  input  logic            first,
  // core memory, filter region
  output logic            mem_re,
  output logic [AW-1:0]   mem_raddr,
  input  fword_t          mem_rdata,
  output logic            mem_we,
  output logic [AW-1:0]   mem_waddr,
  output fword_t          mem_wdata,
  // events
  output logic            drop,
  output logic            clip
);

  // ---- step 1: power and conversion to floating point
  logic [PWRW:0]   p;
  logic [4:0]      msb;
  logic [PWRW:0]   pn;
  logic [7:0]      pe_full;
  logic [FEXPW-1:0] pe;
  logic [PFRACW-1:0] pf;

  always_comb begin
    p   = (PWRW+1)'(in_re2) + (PWRW+1)'(in_im2);
    msb = '0;
    for (int i = 0; i <= int'(PWRW); i++) if (p[i]) msb = 5'(i);
    pn      = p << (5'(PWRW) - msb);
    pe_full = 8'(msb) + 8'({in_exp, 1'b0}) + 8'd1;
    if (p == '0) begin
      pe = '0; pf = '0;
    end else if (pe_full > 8'd63) begin
      pe = 6'd63; pf = '1;
    end else begin
      pe = FEXPW'(pe_full);
      pf = pn[PWRW-1 -: PFRACW];
    end
  end

  // ---- step 2: read the old value; pipeline register
  logic            v1;
  logic [AW-1:0]   a1;
  logic [FEXPW-1:0] pe1;
  logic [PFRACW-1:0] pf1;
  logic            use_old1;
  logic            integ1;
  logic [2:0]      k1;
  logic            clip_p1;

  assign mem_re    = in_valid;
  assign mem_raddr = in_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end
  always_ff @(posedge clk) begin
    a1       <= in_addr;
    pe1      <= pe;
    pf1      <= pf;
    use_old1 <= !first && (mode != PP_BYPASS);
    integ1   <= (mode == PP_INTEGRATE);
    k1       <= k;
    clip_p1  <= (p != '0) && (pe_full > 8'd63);
  end

  // ---- step 3: P = p + K * P_old
  logic [12:0]      mp, mo, kp, ma, mb;
  logic [FEXPW-1:0] eo, ebig;
  logic [6:0]       diff;
  logic [13:0]      sum;
  logic [3:0]       q;
  logic [13:0]      sn;
  logic signed [8:0] en;
  fword_t           res;
  logic             drop_c, clip_c;

  always_comb begin
    mp = (pe1 != '0) ? {1'b1, pf1, 7'b0} : 13'd0;
    eo = use_old1 ? mem_rdata.e : '0;
    mo = (eo != '0) ? {1'b1, mem_rdata.f} : 13'd0;
    kp = integ1 ? mo : (mo - (mo >> k1));
    if (kp == '0) eo = '0;
    drop_c = 1'b0;
    if (pe1 >= eo) begin
      ebig = pe1;
      diff = 7'(pe1 - eo);
      ma   = mp;
      mb   = (diff > 7'd15) ? 13'd0 : (kp >> diff);
      drop_c = (eo != '0) && (diff > 7'd15);
    end else begin
      ebig = eo;
      diff = 7'(eo - pe1);
      ma   = kp;
      mb   = (diff > 7'd15) ? 13'd0 : (mp >> diff);
      drop_c = (pe1 != '0) && (diff > 7'd15);
    end
    sum = 14'(ma) + 14'(mb);
    q = '0;
    for (int i = 0; i < 14; i++) if (sum[i]) q = 4'(i);
    sn = sum << (4'd13 - q);
    en = 9'(ebig) + 9'(q) - 9'sd12;
    clip_c = 1'b0;
    if (sum == '0 || en < 9'sd1) begin
      res = '0;
    end else if (en > 9'sd63) begin
      res = '{e: 6'd63, f: '1};
      clip_c = 1'b1;
    end else begin
      res = '{e: FEXPW'(en), f: sn[12:1]};
    end
    if (clip_p1) res = '{e: 6'd63, f: '1};
  end

  // ---- step 4: write back
  assign mem_we    = v1;
  assign mem_waddr = a1;
  assign mem_wdata = res;
  assign drop      = v1 && drop_c;
  assign clip      = v1 && (clip_c || clip_p1);

endmodule

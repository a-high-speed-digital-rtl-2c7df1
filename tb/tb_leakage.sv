// tb_leakage -- spectral leakage of the 4096-point transform, with and
// without Hanning weighting.
//
// A complex tone of amplitude 2000 lies midway between bins 100 and 101,
// the worst case for leakage.  Samples pass through hanning_weight (one
// clock of source register plus its four clocks, the five clocks the FFT
// unit expects) into the full-size fft_unit.  Set 1 is unweighted, set 2
// Hanning weighted.  Bin powers are scaled by the block exponent and given
// relative to a tone exactly on a bin (unweighted: (2000 N)^2; weighted:
// (1000 N)^2, the window's coherent gain of 1/2).  Checks:
//   unweighted  the two centre bins 3.9 dB down and the next two 13.5 dB
//               down (within 0.3 dB);
//   weighted    the two centre bins 1.4 dB down, and the largest bin
//               outside the main lobe (2.5 or more bins from the tone)
//               between 31.4 and 33 dB down;
//   both        every bin within 2.5 bins of the tone, and every bin up to
//               45 dB down (about 10 output steps), within 1 dB of a direct
//               evaluation of the weighted (or unweighted) sum.
module tb_leakage;
  import dfa_pkg::*;
  localparam int LOG2N = 12;
  localparam int N     = 1 << LOG2N;
  localparam real PI   = 3.141592653589793;
  localparam real F0   = 100.5;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic start, start_ack, ld_req, out_valid, out_last, busy, scale_event;
  logic [3:0] log2n;
  logic [LOG2N-1:0] ld_idx, out_bin;
  cplx_t ld_data;
  logic [PWRW-1:0] out_re2, out_im2;
  logic [EXPW-1:0] out_exp;
  logic hann_en;

  fft_unit u_fft (.*);

  // sample source: one register, then the weighting
  int xr [N], xi [N];
  cplx_t smp;
  logic [LOG2N-1:0] idx_d;
  always_ff @(posedge clk) begin
    smp.re <= sample_t'(xr[ld_idx]);
    smp.im <= sample_t'(xi[ld_idx]);
    idx_d  <= ld_idx;
  end
  hanning_weight u_han (.clk, .enable(hann_en), .log2n(4'd12), .idx(idx_d),
                        .din(smp), .dout(ld_data));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  real pwr [N];
  always @(posedge clk) if (rst_n && out_valid) begin
    real sc;
    sc = 1.0;
    for (int i = 0; i < int'(out_exp); i++) sc = sc * 4.0;
    pwr[out_bin] = (real'(out_re2) + real'(out_im2)) * sc;
  end

  function automatic real db(input real r);
    return 10.0 * $ln(r) / $ln(10.0);
  endfunction

  // direct evaluation of the (weighted) sum at bin k, in floating point
  function automatic real ref_pwr(input int k, input bit w);
    real sr, si, a, g;
    sr = 0; si = 0;
    for (int n = 0; n < N; n++) begin
      g = w ? (0.5 - 0.5 * $cos(2*PI*n/N)) : 1.0;
      a = 2*PI*(F0 - k)*n/N;
      sr += g * 2000.0 * $cos(a);
      si += g * 2000.0 * $sin(a);
    end
    return sr*sr + si*si;
  endfunction

  task automatic run_set(input bit w);
    hann_en = w;
    @(negedge clk) start = 1;
    @(posedge clk);
    while (!start_ack) @(posedge clk);
    @(negedge clk) start = 0;
    wait (out_last);
    repeat (3) @(posedge clk);
  endtask

  task automatic check_set(input bit w);
    real on, r, side;
    int nref;
    on = w ? (1000.0 * N) ** 2 : (2000.0 * N) ** 2;
    if (!w) begin
      chk(db(pwr[100] / on) > -4.2 && db(pwr[100] / on) < -3.6, $sformatf("bin 100: %0.2f dB", db(pwr[100] / on)));
      chk(db(pwr[101] / on) > -4.2 && db(pwr[101] / on) < -3.6, $sformatf("bin 101: %0.2f dB", db(pwr[101] / on)));
      chk(db(pwr[99]  / on) > -13.8 && db(pwr[99]  / on) < -13.2, $sformatf("bin 99: %0.2f dB", db(pwr[99] / on)));
      chk(db(pwr[102] / on) > -13.8 && db(pwr[102] / on) < -13.2, $sformatf("bin 102: %0.2f dB", db(pwr[102] / on)));
      $display("unweighted: centre bins %0.2f / %0.2f dB, next %0.2f / %0.2f dB",
               db(pwr[100] / on), db(pwr[101] / on), db(pwr[99] / on), db(pwr[102] / on));
    end else begin
      chk(db(pwr[100] / on) > -1.7 && db(pwr[100] / on) < -1.1, $sformatf("hann bin 100: %0.2f dB", db(pwr[100] / on)));
      chk(db(pwr[101] / on) > -1.7 && db(pwr[101] / on) < -1.1, $sformatf("hann bin 101: %0.2f dB", db(pwr[101] / on)));
      side = 0;
      for (int k = 0; k < N; k++) if (k < 99 || k > 102) if (pwr[k] > side) side = pwr[k];
      $display("hanning: centre bins %0.2f / %0.2f dB, largest sidelobe bin %0.2f dB",
               db(pwr[100] / on), db(pwr[101] / on), db(side / on));
      chk(db(side / on) <= -31.4 && db(side / on) > -33.0, $sformatf("sidelobe %0.2f dB", db(side / on)));
    end
    nref = 0;
    for (int k = 80; k < 122; k++) begin
      r = ref_pwr(k, w);
      if ((k >= 98 && k <= 103) || r / on > 3.0e-5) begin
        nref++;
        chk(db(pwr[k] / r) > -1.0 && db(pwr[k] / r) < 1.0,
            $sformatf("set %0d bin %0d: %0.2f dB, direct %0.2f dB", w, k, db(pwr[k] / on), db(r / on)));
      end
    end
    chk(nref >= 6, "bins compared");
  endtask

  initial begin
    for (int n = 0; n < N; n++) begin
      xr[n] = $rtoi($floor(2000.0 * $cos(2*PI*F0*n/N) + 0.5));
      xi[n] = $rtoi($floor(2000.0 * $sin(2*PI*F0*n/N) + 0.5));
    end
    start = 0; log2n = 4'd12; hann_en = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_set(1'b0);
    check_set(1'b0);
    run_set(1'b1);
    check_set(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dfa_top -- end-to-end test of the analyzer at its full size (4096
// points), samples entering through the A/D ports and results read back
// through the host port.
//
//   set 1       one 4096-point complex set, no weighting, bypass: the stored
//               bins must equal |DFT|^2 of the samples (x16 input scaling).
//   sets 2-4    Hanning weighting, integration; sets 2 and 3 arrive back to
//               back so the third set's load overlaps the second's output;
//               set 4 is tiny noise that vanishes next to the integrated
//               tones (ratio drop).  Bins must equal p2 + p3 + p4.
//   sets 5-6    real input, four interlaced 1024-point channels, recursive
//               filter k = 2: bins must equal p6 + 0.75 p5 per channel.
//   end         run cleared, two blocks arrive: overrun.
// Expected powers come from a direct DFT in floating point; a bin must lie
// within 4% plus the effect of a few LSB of transform noise at the block
// exponent.  The transform time (start of passes to first output) must be
// the sum of N/2 + 6 + D_p (D_p counted only up to 64, so 24,775 clocks)
// and below 30,000 clocks (12 ms at 2.5 MHz), and
// the bin updates of one set must take 4096 clocks (below 15,000, 6 ms).
// Every mechanism (scaled pass, pass reordered through the switched
// register B, pass reordered through the variable delays, overlapped load,
// Hanning, the three
// postprocessing modes, restart, ratio drop, interlaced channels, real input,
// overrun) is counted and must occur.
module tb_dfa_top;
  import dfa_pkg::*;
  localparam int N = 4096;
  localparam real PI = 3.141592653589793;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic adc_valid, panel_ld, host_ld, host_rd_en, host_rd_valid, busy, overrun;
  logic [7:0] adc_i, adc_q;
  logic [CTRLW-1:0] panel_data, host_data;
  logic [12:0] host_rd_addr;
  fword_t host_rd_data;
  logic [15:0] sets_done;

  dfa_top dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---- mechanism counters
  int n_scale = 0, n_overlap = 0, n_hann = 0, n_bypass = 0, n_integ = 0, n_filt = 0;
  int n_first = 0, n_drop = 0, n_multi = 0, n_real = 0, n_ovr = 0;
  int n_segp = 0, n_vdp = 0;
  int cyc = 0;
  int pass1_t = -1, outs_t = -1, out_len = 0, last_exp = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (dut.u_fft.scale_event) n_scale++;
    if (dut.u_fft.u_ctl.pass_start && !dut.u_fft.u_ctl.last_pass) begin
      if (dut.u_fft.u_ctl.seg_pass) n_segp++;
      else n_vdp++;
    end
    if (dut.u_fft.start_ack && dut.u_fft.u_ctl.state == 2'd2) n_overlap++;
    if (dut.u_fft.start_ack) begin
      if (dut.ctrl.hanning) n_hann++;
      if (dut.fft_log2n != 4'd12) n_multi++;
      if (!dut.ctrl.cplx_in) n_real++;
    end
    if (dut.fft_out_last) begin
      unique case (dut.ctrl.pp_mode)
        PP_BYPASS: n_bypass++;
        PP_INTEGRATE: n_integ++;
        default: n_filt++;
      endcase
    end
    if (dut.pp_first && dut.fft_out_last) n_first++;
    if (dut.u_pp.drop) n_drop++;
    if (overrun) n_ovr++;
    // transform time of sets with 12 passes
    if (dut.u_fft.u_ctl.pass_start && dut.u_fft.u_ctl.pnum == 4'd1) pass1_t = cyc;
    if (dut.fft_out_valid && !$past(dut.fft_out_valid)) begin
      outs_t = cyc; out_len = 0;
      if (int'(dut.u_fft.out_exp) > last_exp) last_exp = int'(dut.u_fft.out_exp);
      if (dut.fft_log2n == 4'd12) begin
        int p_sum;
        p_sum = 0;
        for (int p = 1; p <= 12; p++) p_sum += N/2 + 6 + ((p < 12 && (N >> (p+1)) <= 64) ? (N >> (p+1)) : 0);
        // pass1_t is the first pass clock; outputs appear one clock after the output phase starts
        chk(outs_t - pass1_t == p_sum + 1, $sformatf("transform time %0d want %0d", outs_t - pass1_t, p_sum + 1));
        chk(p_sum < 30000, "transform under 12 ms at 2.5 MHz");
      end
    end
    if (dut.fft_out_valid) out_len++;
    if (dut.fft_out_last) chk(out_len == N && N < 15000, "4096 bin updates in 4096 clocks");
  end

  // ---- stimulus and reference
  int si [N], sq [N];
  real ctab [N], stab [N];
  real pw [N];            // power of the last generated block, per filter bin
  real expect_p [2*N];    // expected filter value per address

  task automatic make_block(input int kind);
    for (int n = 0; n < N; n++) begin
      unique case (kind)
        0: begin   // two complex tones and a little noise
          si[n] = $rtoi(60.0 * $cos(2*PI*100*n/N) + 20.0 * $cos(2*PI*900.3*n/N + 1.0)) + int'($urandom_range(6)) - 3;
          sq[n] = $rtoi(60.0 * $sin(2*PI*100*n/N) + 20.0 * $sin(2*PI*900.3*n/N + 1.0)) + int'($urandom_range(6)) - 3;
        end
        1: begin   // tiny noise
          si[n] = int'($urandom_range(2)) - 1;
          sq[n] = int'($urandom_range(2)) - 1;
        end
        default: begin   // real: a different tone in each of 4 channels
          si[n] = $rtoi(50.0 * $cos(2*PI*(37 + 100*(n%4))*(n/4)/1024.0)) + int'($urandom_range(4)) - 2;
          sq[n] = 0;
        end
      endcase
    end
  endtask

  // power of each bin of the current block, indexed by filter bin address
  task automatic ref_power(input int g, input bit hann);
    int m, nn, mm;
    m  = 12 - g; nn = 1 << g; mm = 1 << m;
    for (int ch = 0; ch < mm; ch++) begin
      real xr [], xi [];
      xr = new[nn]; xi = new[nn];
      for (int q = 0; q < nn; q++) begin
        real w;
        w = hann ? 0.5 - 0.5 * ctab[(q * mm) % N] : 1.0;
        xr[q] = 16.0 * si[q*mm + ch] * w;
        xi[q] = 16.0 * sq[q*mm + ch] * w;
      end
      for (int k = 0; k < nn; k++) begin
        real ar, ai;
        int rch, idx;
        ar = 0; ai = 0;
        for (int q = 0; q < nn; q++) begin
          idx = ((q * k) % nn) * mm;
          ar += xr[q] * ctab[idx] + xi[q] * stab[idx];
          ai += xi[q] * ctab[idx] - xr[q] * stab[idx];
        end
        rch = 0;
        for (int i = 0; i < m; i++) if (((ch >> i) & 1) != 0) rch |= 1 << (m-1-i);
        pw[(rch << g) | k] = ar * ar + ai * ai;
      end
    end
  endtask

  task automatic feed_block();
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      adc_valid = 1; adc_i = 8'(si[n]); adc_q = 8'(sq[n]);
    end
    @(negedge clk) adc_valid = 0;
  endtask

  task automatic load_ctrl(input ctrl_t c);
    @(negedge clk) host_ld = 1; host_data = CTRLW'(c);
    @(negedge clk) host_ld = 0;
  endtask

  task automatic wait_sets(input int s);
    while (sets_done < 16'(s)) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  function automatic real fval(input fword_t w);
    real r;
    if (w.e == 0) return 0.0;
    r = 1.0 + real'(w.f) / 4096.0;
    for (int i = 1; i < int'(w.e); i++) r = r * 2.0;
    return r;
  endfunction

  task automatic check_bins(input int bank, input string what, input int nsets);
    int bad = 0;
    real d, tol, e2, got;
    e2 = 1.0;
    for (int i = 0; i < last_exp; i++) e2 = e2 * 2.0;
    d = 4.0 * e2 * $sqrt(real'(nsets));             // a few LSB of transform noise
    for (int a = 0; a < N; a++) begin
      @(negedge clk) host_rd_en = 1; host_rd_addr = 13'((bank << 12) | a);
      @(negedge clk) host_rd_en = 0;
      @(posedge clk);
      got = fval(host_rd_data);
      tol = 0.04 * expect_p[a] + 2.0 * $sqrt(expect_p[a]) * d + d * d;
      checks++;
      if (!host_rd_valid || got > expect_p[a] + tol || got < expect_p[a] - tol) begin
        failures++; bad++;
        if (bad < 5) $display("FAIL %s bin %0d got %g want %g (tol %g)", what, a, got, expect_p[a], tol);
      end
    end
    $display("%s: %0d bins checked, %0d bad, largest block exponent %0d", what, N, bad, last_exp);
    last_exp = 0;
  endtask

  initial begin
    ctrl_t c;
    for (int i = 0; i < N; i++) begin
      ctab[i] = $cos(2*PI*i/N);
      stab[i] = $sin(2*PI*i/N);
    end
    adc_valid = 0; adc_i = 0; adc_q = 0; panel_ld = 0; host_ld = 0;
    panel_data = 0; host_data = 0; host_rd_en = 0; host_rd_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- set 1: bypass, 4096 points, complex
    c = '0; c.log2n = 4'd12; c.cplx_in = 1; c.run = 1; c.pp_mode = PP_BYPASS; c.bank = 0;
    load_ctrl(c);
    make_block(0); ref_power(12, 0);
    for (int a = 0; a < N; a++) expect_p[a] = pw[a];
    feed_block();
    wait_sets(1);
    check_bins(0, "bypass", 1);

    // ---- sets 2-4: Hanning, integrate, bank 1, overlapped loads
    c.hanning = 1; c.pp_mode = PP_INTEGRATE; c.bank = 1;
    load_ctrl(c);
    make_block(0); ref_power(12, 1);
    for (int a = 0; a < N; a++) expect_p[a] = pw[a];
    feed_block();
    make_block(0); ref_power(12, 1);
    for (int a = 0; a < N; a++) expect_p[a] += pw[a];
    feed_block();
    wait_sets(3);
    make_block(1); ref_power(12, 1);
    for (int a = 0; a < N; a++) expect_p[a] += pw[a];
    feed_block();
    wait_sets(4);
    check_bins(1, "integrate", 3);

    // ---- sets 5-6: real input, 4 channels of 1024 points, filter k = 2
    c.hanning = 0; c.pp_mode = PP_FILTER; c.k = 3'd2; c.bank = 0; c.log2n = 4'd10; c.cplx_in = 0;
    load_ctrl(c);
    make_block(2); ref_power(10, 0);
    for (int a = 0; a < N; a++) expect_p[a] = pw[a];
    feed_block();
    make_block(2); ref_power(10, 0);
    for (int a = 0; a < N; a++) expect_p[a] = pw[a] + 0.75 * expect_p[a];
    feed_block();
    wait_sets(6);
    check_bins(0, "filter", 2);

    // ---- overrun: run cleared, two blocks arrive
    c.run = 0;
    load_ctrl(c);
    feed_block();
    feed_block();
    repeat (4) @(posedge clk);

    $display("mechanisms: switched-register passes %0d, variable-delay passes %0d",
             n_segp, n_vdp);
    $display("mechanisms: scaled passes %0d, overlapped loads %0d, hanning sets %0d, bypass %0d, integrate %0d, filter %0d, restarts %0d, drops %0d, interlaced sets %0d, real-input sets %0d, overruns %0d",
             n_scale, n_overlap, n_hann, n_bypass, n_integ, n_filt, n_first, n_drop, n_multi, n_real, n_ovr);
    chk(n_scale > 0, "scaled pass happened");
    chk(n_overlap > 0, "overlapped load happened");
    chk(n_segp > 0 && n_vdp > 0, "both reordering formats happened");
    chk(n_hann > 0, "hanning happened");
    chk(n_bypass > 0 && n_integ > 0 && n_filt > 0, "all postprocessing modes happened");
    chk(n_first == 3, "restart on each control load");
    chk(n_drop > 0, "ratio drop happened");
    chk(n_multi > 0, "interlaced channels happened");
    chk(n_real > 0, "real input happened");
    chk(n_ovr > 0, "overrun happened");
    chk(sets_done == 16'd6, "six sets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

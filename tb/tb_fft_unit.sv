// tb_fft_unit -- self-checking test of the shift-register FFT.
//
// Runs three sets through a 256-point unit: random complex data, a single
// tone (which forces scaling on every pass), and random data split into four
// interlaced 64-point transforms (log2n = 6).  The second and third sets are
// requested while the previous one is still being transformed, so their
// loads overlap the output phases.  Every output word is compared with a
// direct DFT computed here in floating point, scaled by the reported block
// exponent; the magnitudes of the real and imaginary parts must agree
// within a few LSB.  The longest variable delay is set to 16, so passes 1
// and 2 (D = 64, 32) reorder through the switched register B and the rest
// through the variable delays.  The clocks from start to the first output
// are checked against N + IN_LAT + 2 + sum(N/2 + 6 + D'_p), where D'_p is
// D_p = N/2^(p+1) for a variable-delay pass and 0 otherwise.
module tb_fft_unit;
  import dfa_pkg::*;
  localparam int LOG2N  = 8;
  localparam int N      = 1 << LOG2N;
  localparam int IN_LAT = 5;
  localparam int VD_MAX = 16;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic start, start_ack, ld_req, out_valid, out_last, busy, scale_event;
  logic [3:0] log2n;
  logic [LOG2N-1:0] ld_idx, out_bin;
  cplx_t ld_data;
  logic [PWRW-1:0] out_re2, out_im2;
  logic [EXPW-1:0] out_exp;

  fft_unit #(.LOG2N(LOG2N), .IN_LAT(IN_LAT), .VD_MAX(VD_MAX)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // three data sets
  int xr [3][N];
  int xi [3][N];
  int set_log2n [3] = '{8, 8, 6};

  // load data delivered IN_LAT clocks after each request
  int ld_set;          // which set the current load belongs to
  logic [LOG2N-1:0] idx_pipe [IN_LAT];
  int               set_pipe [IN_LAT];
  always_ff @(posedge clk) begin
    idx_pipe[0] <= ld_idx;
    set_pipe[0] <= ld_set;
    for (int i = 1; i < IN_LAT; i++) begin
      idx_pipe[i] <= idx_pipe[i-1];
      set_pipe[i] <= set_pipe[i-1];
    end
  end
  always_comb begin
    ld_data.re = sample_t'(xr[set_pipe[IN_LAT-1]][idx_pipe[IN_LAT-1]]);
    ld_data.im = sample_t'(xi[set_pipe[IN_LAT-1]][idx_pipe[IN_LAT-1]]);
  end

  // expected magnitudes of the real and imaginary parts
  real er [N], ei [N];
  task automatic ref_dft(input int s);
    int g, m, nn;
    g  = set_log2n[s];
    m  = LOG2N - g;
    nn = 1 << g;
    for (int ch = 0; ch < (1 << m); ch++) begin
      for (int k = 0; k < nn; k++) begin
        real sr, si, th;
        int rch, bin;
        sr = 0; si = 0;
        for (int n = 0; n < nn; n++) begin
          th = -2.0 * 3.141592653589793 * real'(n * k) / real'(nn);
          sr += xr[s][n*(1<<m)+ch] * $cos(th) - xi[s][n*(1<<m)+ch] * $sin(th);
          si += xr[s][n*(1<<m)+ch] * $sin(th) + xi[s][n*(1<<m)+ch] * $cos(th);
        end
        rch = 0;
        for (int i = 0; i < m; i++) if ((ch & (1 << i)) != 0) rch |= 1 << (m-1-i);
        bin = (rch << g) | k;
        er[bin] = sr; ei[bin] = si;
      end
    end
  endtask

  int ack_cyc [3];
  int first_out [3];
  int n_ack = 0, n_out_sets = 0, n_words = 0, n_scale = 0;
  real maxerr;

  always @(posedge clk) if (scale_event) n_scale++;

  always @(posedge clk) begin
    if (start && start_ack) begin
      ack_cyc[n_ack] = cyc;
      ld_set         = n_ack;
      n_ack++;
    end
  end

  function automatic int expect_latency(input int g);
    int p_sum = 0;
    for (int p = 1; p <= g; p++) p_sum += N/2 + 6 + ((p < g && (N >> (p+1)) <= VD_MAX) ? (N >> (p+1)) : 0);
    return N + IN_LAT + 2 + p_sum;
  endfunction

  // check outputs
  always @(posedge clk) begin
    if (out_valid) begin
      real sc, gr, gi, dr, di;
      int s;
      s = n_out_sets;
      if (n_words == 0) begin
        first_out[s] = cyc;
        checks++;
        if (cyc - ack_cyc[s] != expect_latency(set_log2n[s])) begin
          failures++;
          $display("FAIL set %0d latency %0d expected %0d", s, cyc - ack_cyc[s],
                   expect_latency(set_log2n[s]));
        end
      end
      sc = real'(1 << out_exp);
      gr = $sqrt(real'(out_re2));
      gi = $sqrt(real'(out_im2));
      dr = gr - ((er[out_bin] < 0) ? -er[out_bin] : er[out_bin]) / sc;
      di = gi - ((ei[out_bin] < 0) ? -ei[out_bin] : ei[out_bin]) / sc;
      if (dr < 0) dr = -dr;
      if (di < 0) di = -di;
      if (dr > maxerr) maxerr = dr;
      if (di > maxerr) maxerr = di;
      checks++;
      if (dr > 4.0 || di > 4.0) begin
        failures++;
        if (failures < 10)
          $display("FAIL set %0d bin %0d got (%0.1f,%0.1f) want (%0.1f,%0.1f) exp %0d",
                   s, out_bin, gr, gi, er[out_bin]/sc, ei[out_bin]/sc, out_exp);
      end
      n_words++;
      if (out_last) begin
        checks++;
        if (n_words != N) begin failures++; $display("FAIL words %0d", n_words); end
        $display("set %0d done: exp=%0d max error %0.2f LSB", s, out_exp, maxerr);
        n_words = 0;
        n_out_sets++;
        maxerr = 0;
        if (n_out_sets < 3) ref_dft(n_out_sets);
      end
    end
  end

  initial begin
    maxerr = 0;
    ld_set = 0;
    for (int n = 0; n < N; n++) begin
      xr[0][n] = int'($urandom_range(4094)) - 2047;
      xi[0][n] = int'($urandom_range(4094)) - 2047;
      xr[1][n] = $rtoi(2000.0 * $cos(2.0*3.141592653589793*5*n/N + 0.3));
      xi[1][n] = $rtoi(2000.0 * $sin(2.0*3.141592653589793*5*n/N + 0.3));
      xr[2][n] = int'($urandom_range(2046)) - 1023;
      xi[2][n] = int'($urandom_range(2046)) - 1023;
    end
    ref_dft(0);
    start = 0; log2n = 4'(set_log2n[0]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      @(negedge clk);
      start = 1; log2n = 4'(set_log2n[s]);
      @(posedge clk);
      while (!start_ack) @(posedge clk);
      @(negedge clk) start = 0;
      // next request once this set is under way
      wait (dut.u_ctl.state == 2'd2);
      if (s == 1) wait (dut.u_ctl.pnum == 4'(set_log2n[s]));
    end
    wait (n_out_sets == 3);
    repeat (5) @(posedge clk);
    checks++;
    if (n_scale == 0) begin failures++; $display("FAIL no scaled pass"); end
    checks++;
    // the overlapped set must start its passes as soon as the output ends
    if (first_out[2] - first_out[1] != N + (expect_latency(6) - N - IN_LAT - 2)) begin
      failures++;
      $display("FAIL overlap spacing %0d", first_out[2] - first_out[1]);
    end
    $display("scaled passes: %0d", n_scale);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

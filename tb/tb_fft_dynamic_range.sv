// tb_fft_dynamic_range -- two-signal dynamic range of the full-size
// (4096-point) FFT unit with its 13-bit words.
//
// Input: a strong complex tone (amplitude 2000, bin 100) plus a weak one
// 50 dB below it (bin 1300).  The largest bin other than the two tones sets
// the two-signal range, which is printed.  A small uniform noise (+-3) is
// added to both input components so the arithmetic floor is exercised; it must be at least 60 dB below
// the strong tone, the weak tone must come out within 1.5 dB of its true
// level, and the strong one within 0.2 dB.  The set must take the
// sum over passes of (2048 + 6 + D_p) clocks, with D_p counted only when it
// is at most 64 (24,775 clocks).
module tb_fft_dynamic_range;
  import dfa_pkg::*;
  localparam int LOG2N  = 12;
  localparam int N      = 1 << LOG2N;
  localparam int IN_LAT = 5;
  localparam real PI = 3.141592653589793;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic start, start_ack, ld_req, out_valid, out_last, busy, scale_event;
  logic [3:0] log2n;
  logic [LOG2N-1:0] ld_idx, out_bin;
  cplx_t ld_data;
  logic [PWRW-1:0] out_re2, out_im2;
  logic [EXPW-1:0] out_exp;

  fft_unit dut (.*);

  int checks = 0, failures = 0;
  int xr [N], xi [N];
  logic [LOG2N-1:0] idx_pipe [IN_LAT];
  always_ff @(posedge clk) begin
    idx_pipe[0] <= ld_idx;
    for (int i = 1; i < IN_LAT; i++) idx_pipe[i] <= idx_pipe[i-1];
  end
  assign ld_data.re = sample_t'(xr[idx_pipe[IN_LAT-1]]);
  assign ld_data.im = sample_t'(xi[idx_pipe[IN_LAT-1]]);

  real pwr [N];
  int  n_out = 0, cyc = 0, t_pass1 = 0, t_out = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && dut.u_ctl.pass_start && dut.u_ctl.pnum == 4'd1) t_pass1 = cyc;
    if (rst_n && out_valid) begin
      real sc;
      if (n_out == 0) t_out = cyc;
      sc = 1.0;
      for (int i = 0; i < int'(out_exp); i++) sc = sc * 4.0;
      pwr[out_bin] = (real'(out_re2) + real'(out_im2)) * sc;
      n_out++;
    end
  end

  function automatic real db(input real r);
    return 10.0 * $ln(r) / $ln(10.0);
  endfunction

  initial begin
    real a_weak, p_strong, p_weak, spur, ref_s, ref_w;
    int spur_bin, p_sum;
    a_weak = 2000.0 * (10.0 ** (-50.0 / 20.0));
    void'($urandom(7));
    for (int n = 0; n < N; n++) begin
      xr[n] = $rtoi($floor(2000.0 * $cos(2*PI*100*n/N) + a_weak * $cos(2*PI*1300*n/N) + 0.5)) + $urandom_range(6) - 3;
      xi[n] = $rtoi($floor(2000.0 * $sin(2*PI*100*n/N) + a_weak * $sin(2*PI*1300*n/N) + 0.5)) + $urandom_range(6) - 3;
    end
    start = 0; log2n = 4'd12;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(posedge clk);
    while (!start_ack) @(posedge clk);
    @(negedge clk) start = 0;
    wait (out_last);
    repeat (3) @(posedge clk);
    p_sum = 0;
    for (int p = 1; p <= 12; p++) p_sum += N/2 + 6 + ((p < 12 && (N >> (p+1)) <= 64) ? (N >> (p+1)) : 0);
    checks++;
    if (t_out - t_pass1 != p_sum + 1) begin
      failures++; $display("FAIL transform time %0d want %0d", t_out - t_pass1, p_sum + 1);
    end
    checks++;
    if (n_out != N) begin failures++; $display("FAIL %0d outputs", n_out); end
    ref_s = (2000.0 * N) ** 2;
    ref_w = (a_weak * N) ** 2;
    p_strong = pwr[100];
    p_weak   = pwr[1300];
    spur = 0; spur_bin = 0;
    for (int k = 0; k < N; k++)
      if (k != 100 && k != 1300 && pwr[k] > spur) begin spur = pwr[k]; spur_bin = k; end
    $display("strong tone %0.2f dB, weak tone %0.2f dB (true -50.00), largest other bin %0.1f dB (bin %0d)",
             db(p_strong / ref_s), db(p_weak / p_strong), db(spur / p_strong), spur_bin);
    checks++;
    if (db(p_strong / ref_s) > 0.2 || db(p_strong / ref_s) < -0.2) begin failures++; $display("FAIL strong tone level"); end
    checks++;
    if (db(p_weak / ref_w) > 1.5 || db(p_weak / ref_w) < -1.5) begin failures++; $display("FAIL weak tone level"); end
    checks++;
    if (db(spur / p_strong) > -60.0) begin failures++; $display("FAIL two-signal range below 60 dB"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

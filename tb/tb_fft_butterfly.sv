// tb_fft_butterfly -- random operands and twiddles, with and without
// scaling; each result is compared 3 clocks later with A +- B*W worked out
// in floating point (within 1 LSB).
module tb_fft_butterfly;
  import dfa_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  cplx_t a, b, a_o, b_o;
  sample_t wc, ws;
  logic scale;
  fft_butterfly dut (.*);

  int checks = 0, failures = 0;
  real ear [4], eai [4], ebr [4], ebi [4];

  function automatic int rnd(input real v);
    return $rtoi((v >= 0) ? v + 0.5 : v - 0.5);
  endfunction
  function automatic bit close(input int got, input real want);
    real d;
    d = real'(got) - want;
    return (d <= 1.01) && (d >= -1.01);
  endfunction

  initial begin
    real th, c, s, br, bi, sc;
    for (int n = 0; n < 2000 + 3; n++) begin
      @(negedge clk);
      if (n >= 3) begin
        checks++;
        if (!close(int'(a_o.re), ear[2]) || !close(int'(a_o.im), eai[2]) ||
            !close(int'(b_o.re), ebr[2]) || !close(int'(b_o.im), ebi[2])) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d got %0d %0d %0d %0d want %0.1f %0.1f %0.1f %0.1f",
            n, int'(a_o.re), int'(a_o.im), int'(b_o.re), int'(b_o.im), ear[2], eai[2], ebr[2], ebi[2]);
        end
      end
      for (int i = 3; i > 0; i--) begin
        ear[i] = ear[i-1]; eai[i] = eai[i-1]; ebr[i] = ebr[i-1]; ebi[i] = ebi[i-1];
      end
      a.re = sample_t'(int'($urandom_range(2046)) - 1023);
      a.im = sample_t'(int'($urandom_range(2046)) - 1023);
      b.re = sample_t'(int'($urandom_range(2046)) - 1023);
      b.im = sample_t'(int'($urandom_range(2046)) - 1023);
      th = 2.0 * 3.141592653589793 * real'($urandom_range(4095)) / 4096.0;
      wc = sample_t'(rnd(4095.0 * $cos(th)));
      ws = sample_t'(rnd(4095.0 * $sin(th)));
      scale = 1'($urandom_range(1));
      c = real'(wc) / 4096.0; s = real'(ws) / 4096.0;
      br = real'(b.re) * c + real'(b.im) * s;
      bi = real'(b.im) * c - real'(b.re) * s;
      sc = scale ? 0.5 : 1.0;
      ear[0] = (real'(a.re) + br) * sc; eai[0] = (real'(a.im) + bi) * sc;
      ebr[0] = (real'(a.re) - br) * sc; ebi[0] = (real'(a.im) - bi) * sc;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

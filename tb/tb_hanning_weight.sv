// tb_hanning_weight -- 64-sample blocks of random samples, weighted as one
// 64-point set and as four interlaced 16-point sets, and once with the
// weighting off.  Each output, 4 clocks after its input, must be within
// 1 LSB of x * (1/2 - 1/2 cos(2 pi q / N)) with q = n / M.
module tb_hanning_weight;
  import dfa_pkg::*;
  localparam int LOG2N = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic enable;
  logic [3:0] log2n;
  logic [LOG2N-1:0] idx;
  cplx_t din, dout;
  hanning_weight #(.LOG2N(LOG2N)) dut (.*);

  int checks = 0, failures = 0;
  real er [5], ei [5];

  initial begin
    int modes [3][2] = '{'{1, 6}, '{1, 4}, '{0, 6}};
    for (int m = 0; m < 3; m++) begin
      for (int n = 0; n < 64 + 4; n++) begin
        @(negedge clk);
        if (n >= 4) begin
          real dr, di;
          dr = real'(int'(dout.re)) - er[3];
          di = real'(int'(dout.im)) - ei[3];
          checks++;
          if (dr > 1.01 || dr < -1.01 || di > 1.01 || di < -1.01) begin
            failures++;
            if (failures < 10) $display("FAIL mode %0d n %0d got %0d want %0.1f", m, n - 4,
                                        int'(dout.re), er[3]);
          end
        end
        for (int i = 4; i > 0; i--) begin er[i] = er[i-1]; ei[i] = ei[i-1]; end
        enable = 1'(modes[m][0]);
        log2n  = 4'(modes[m][1]);
        idx    = LOG2N'(n);
        din.re = sample_t'(int'($urandom_range(4094)) - 2047);
        din.im = sample_t'(int'($urandom_range(4094)) - 2047);
        begin
          int q, nn;
          real w;
          nn = 1 << modes[m][1];
          q  = (n % 64) / (64 / nn);
          w  = enable ? (0.5 - 0.5 * $cos(2.0 * 3.141592653589793 * q / nn)) : 1.0;
          er[0] = real'(int'(din.re)) * w;
          ei[0] = real'(int'(din.im)) * w;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sincos_gen -- checks every one of the 4096 angles against cos/sin
// computed in floating point (within 1 LSB of 4096*cos, 4096*sin with 1.0
// saturated to 4095) and checks the 3-clock latency.
module tb_sincos_gen;
  import dfa_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [11:0] angle;
  sample_t cos_o, sin_o;
  sincos_gen dut (.*);

  int checks = 0, failures = 0;
  int a_pipe [4];
  always_ff @(posedge clk) begin
    a_pipe[0] <= int'(angle);
    for (int i = 1; i < 4; i++) a_pipe[i] <= a_pipe[i-1];
  end

  function automatic int ref_v(input real v);
    int r;
    r = $rtoi(v * 4096.0 + ((v >= 0) ? 0.5 : -0.5));
    if (r > 4095) r = 4095;
    return r;
  endfunction

  initial begin
    int ec, es;
    real th;
    angle = 0;
    for (int n = 0; n < 4096 + 4; n++) begin
      @(negedge clk);
      if (n >= 4) begin
        // values on the outputs now belong to the angle given 3 clocks ago
        th = 2.0 * 3.141592653589793 * real'(a_pipe[2]) / 4096.0;
        ec = ref_v($cos(th));
        es = ref_v($sin(th));
        checks++;
        if (int'(cos_o) - ec > 1 || ec - int'(cos_o) > 1 ||
            int'(sin_o) - es > 1 || es - int'(sin_o) > 1) begin
          failures++;
          if (failures < 10) $display("FAIL angle %0d got (%0d,%0d) want (%0d,%0d)",
                                      a_pipe[2], cos_o, sin_o, ec, es);
        end
      end
      angle = 12'((n * 7 + 3) % 4096);   // visits every angle
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_postproc_unit -- drives sets of 32 bins, one bin per clock, through the
// postprocessing unit and a 32-word core region, and compares every stored
// filter word with the same recursion worked out in floating point:
// bypass, integration over four sets, recursive filtering with k = 3 and
// k = 0, a restart (first), a new term too small to matter (drop) and a
// result beyond the exponent range (clip).  The hardware truncates, so a
// stored value may lie up to about 1/32 below the exact one, never above.
module tb_postproc_unit;
  import dfa_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, first, mem_re, mem_we, drop, clip;
  logic [4:0] in_addr, mem_raddr, mem_waddr;
  logic [PWRW-1:0] in_re2, in_im2;
  logic [EXPW-1:0] in_exp;
  pp_mode_e mode;
  logic [2:0] k;
  fword_t mem_rdata, mem_wdata;

  postproc_unit #(.AW(5)) dut (.*);
  core_memory #(.AW(5), .DW(FWORDW)) u_mem (
    .clk, .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata),
    .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata));

  int checks = 0, failures = 0, n_drop = 0, n_clip = 0;
  real model [32];
  bit  clipped [32];
  always @(posedge clk) if (rst_n) begin
    if (drop) n_drop++;
    if (clip) n_clip++;
  end

  function automatic real pow2(input int e);
    real r;
    r = 1.0;
    for (int i = 0; i < e; i++) r = r * 2.0;
    for (int i = 0; i > e; i--) r = r / 2.0;
    return r;
  endfunction

  function automatic real fval(input fword_t w);
    if (w.e == 0) return 0.0;
    return (1.0 + real'(w.f) / 4096.0) * pow2(int'(w.e) - 1);
  endfunction

  // one set: kind 0 random, 1 large, 2 tiny, 3 huge with big exponent
  task automatic run_set(input pp_mode_e md, input int kk, input bit fst, input int kind);
    real kf;
    kf = (md == PP_INTEGRATE) ? 1.0 : (md == PP_FILTER) ? 1.0 - pow2(-kk) : 0.0;
    if (fst) kf = 0.0;
    for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      in_valid = 1; in_addr = 5'(a); mode = md; k = 3'(kk); first = fst;
      unique case (kind)
        0: begin
          in_re2 = (a % 7 == 0) ? 0 : PWRW'($urandom) >> $urandom_range(23);
          in_im2 = (a % 5 == 0) ? 0 : PWRW'($urandom) >> $urandom_range(23);
          in_exp = EXPW'($urandom_range(8));
        end
        1: begin in_re2 = 24'hF00000; in_im2 = 24'h0; in_exp = 5'd10; end
        2: begin in_re2 = 24'd3; in_im2 = 24'd0; in_exp = 5'd0; end
        default: begin in_re2 = 24'hFFFFFF; in_im2 = 24'hFFFFFF; in_exp = 5'd31; end
      endcase
      model[a]   = real'(in_re2 + in_im2) * pow2(2 * int'(in_exp)) + kf * model[a];
      clipped[a] = (kind == 3);
    end
    @(negedge clk) in_valid = 0;
    @(negedge clk);
    for (int a = 0; a < 32; a++) begin
      real got;
      got = fval(fword_t'(u_mem.mem[a]));
      checks++;
      if (clipped[a]) begin
        if (u_mem.mem[a] != {6'd63, 12'hFFF}) begin failures++; $display("FAIL clip word %0d", a); end
      end else if (got > model[a] * 1.0001 || got < model[a] * (1.0 - 1.0/32.0 - 0.002)) begin
        failures++;
        if (failures < 10) $display("FAIL mode %0d bin %0d got %g want %g", md, a, got, model[a]);
      end
    end
  endtask

  initial begin
    in_valid = 0; in_addr = 0; in_re2 = 0; in_im2 = 0; in_exp = 0;
    mode = PP_BYPASS; k = 0; first = 0;
    for (int a = 0; a < 32; a++) model[a] = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_set(PP_BYPASS, 0, 0, 0);
    run_set(PP_INTEGRATE, 0, 1, 0);
    repeat (3) run_set(PP_INTEGRATE, 0, 0, 0);
    run_set(PP_FILTER, 3, 1, 0);
    repeat (4) run_set(PP_FILTER, 3, 0, 0);
    run_set(PP_FILTER, 0, 0, 0);
    run_set(PP_INTEGRATE, 0, 1, 1);
    n_drop = 0;
    run_set(PP_INTEGRATE, 0, 0, 2);
    checks++;
    if (n_drop != 32) begin failures++; $display("FAIL drops %0d", n_drop); end
    run_set(PP_BYPASS, 0, 0, 3);
    checks++;
    if (n_clip != 32) begin failures++; $display("FAIL clips %0d", n_clip); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

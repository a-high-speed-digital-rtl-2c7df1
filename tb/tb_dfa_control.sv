// tb_dfa_control -- control register loads (computer before panel), the
// block / start / acknowledge handshake with the half latched at the
// acknowledge, the run bit, the clamping of log2n (0 and 13..15 mean 12),
// and the restart mark (pp_first) travelling with the first set after a
// register load, even when the next set is started before that set is
// output, and again after a later load.
module tb_dfa_control;
  import dfa_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic panel_ld, host_ld, blk_pending, blk_half, blk_take, fft_start, fft_ack;
  logic ld_half, fft_out_valid, fft_out_last, pp_first;
  logic [CTRLW-1:0] panel_data, host_data;
  ctrl_t ctrl;
  logic [3:0] fft_log2n;
  logic [15:0] sets_done;
  dfa_control dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // the block source: one pending block at a time
  always @(posedge clk) if (rst_n && blk_take) blk_pending <= 0;

  task automatic offer(input bit half);
    @(negedge clk) blk_pending = 1; blk_half = half;
  endtask
  task automatic ack();
    @(negedge clk);
    while (!fft_start) @(negedge clk);
    fft_ack = 1; @(negedge clk) fft_ack = 0;
  endtask
  task automatic output_set(output int firsts);
    firsts = 0;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk) fft_out_valid = 1; fft_out_last = (i == 3);
      #1 if (pp_first) firsts++;
    end
    @(negedge clk) fft_out_valid = 0; fft_out_last = 0;
  endtask

  initial begin
    ctrl_t c;
    int f0, f1, f2;
    panel_ld = 0; host_ld = 0; blk_pending = 0; blk_half = 0; fft_ack = 0;
    fft_out_valid = 0; fft_out_last = 0; panel_data = 0; host_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // panel and computer in the same clock: the computer wins
    c = '0; c.log2n = 4'd10; c.run = 1'b0;
    @(negedge clk) panel_ld = 1; panel_data = 40'h12345; host_ld = 1; host_data = CTRLW'(c);
    @(negedge clk) panel_ld = 0; host_ld = 0;
    chk(ctrl == c, "computer wins");
    chk(fft_log2n == 4'd10, "log2n");
    offer(1);
    repeat (3) @(negedge clk);
    chk(!fft_start && blk_pending, "no start without run");
    c.run = 1'b1; c.log2n = 4'd0;
    @(negedge clk) panel_ld = 1; panel_data = CTRLW'(c);
    @(negedge clk) panel_ld = 0;
    chk(fft_log2n == 4'd12, "log2n 0 means 4096");
    @(negedge clk);
    chk(fft_start && !blk_pending, "start after run");
    ack();
    chk(!fft_start && ld_half == 1'b1, "half latched at ack");
    // next block started before the first set is output
    offer(0);
    ack();
    chk(ld_half == 1'b0, "second half");
    output_set(f0);
    output_set(f1);
    chk(f0 == 4 && f1 == 0, $sformatf("first mark on first set only (%0d %0d)", f0, f1));
    offer(1);
    ack();
    output_set(f2);
    chk(f2 == 0, "no mark later");
    chk(sets_done == 16'd3, "sets counted");
    // a later load from the panel alone: fields taken, log2n 15 clamped,
    // and the next set carries the restart mark again
    c = '0; c.run = 1'b1; c.log2n = 4'd15; c.k = 3'd5; c.pp_mode = PP_FILTER; c.hanning = 1'b1;
    @(negedge clk) panel_ld = 1; panel_data = CTRLW'(c);
    @(negedge clk) panel_ld = 0;
    chk(ctrl == c, "panel load alone");
    chk(fft_log2n == 4'd12, "log2n 15 means 4096");
    c.log2n = 4'd6;
    @(negedge clk) host_ld = 1; host_data = CTRLW'(c);
    @(negedge clk) host_ld = 0;
    chk(fft_log2n == 4'd6, "log2n 6 taken as is");
    offer(0);
    ack();
    chk(ld_half == 1'b0, "half of the fourth block");
    output_set(f2);
    chk(f2 == 4, "mark after a new load");
    chk(sets_done == 16'd4, "four sets counted");
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

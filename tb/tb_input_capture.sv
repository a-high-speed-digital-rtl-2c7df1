// tb_input_capture -- 16-word blocks (LOG2B = 4).  Checks the address and
// word of every store (Q forced to zero for real input), the block
// hand-over of each half of the region, and an overrun when a block is not
// taken before the next one completes.
module tb_input_capture;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic adc_valid, cplx_in, mem_we, blk_pending, blk_half, blk_take, overrun;
  logic [7:0] adc_i, adc_q;
  logic [4:0] mem_waddr;
  logic [15:0] mem_wdata;
  input_capture #(.LOG2B(4)) dut (.*);

  int checks = 0, failures = 0, n = 0, n_blk = 0, n_ovr = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (overrun) n_ovr++;
    if (adc_valid) begin
      chk(mem_we, "write enable");
      chk(int'(mem_waddr) == n % 32, "address");
      chk(mem_wdata == {adc_i, cplx_in ? adc_q : 8'h00}, "word");
      n++;
    end
  end

  task automatic samples(input int cnt, input bit cx);
    for (int i = 0; i < cnt; i++) begin
      @(negedge clk);
      adc_valid = 1; cplx_in = cx;
      adc_i = 8'($urandom); adc_q = 8'($urandom);
      @(negedge clk) adc_valid = 0;
    end
  endtask

  initial begin
    adc_valid = 0; cplx_in = 1; blk_take = 0; adc_i = 0; adc_q = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    samples(15, 1);
    chk(!blk_pending, "no block before 16 words");
    samples(1, 1);
    @(negedge clk);
    chk(blk_pending && !blk_half, "block in half 0");
    blk_take = 1; @(negedge clk) blk_take = 0;
    chk(!blk_pending, "taken");
    samples(16, 0);
    @(negedge clk);
    chk(blk_pending && blk_half, "block in half 1");
    samples(16, 1);             // not taken: overrun
    @(negedge clk);
    chk(n_ovr == 1, "overrun");
    chk(blk_pending && !blk_half, "newest block offered");
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

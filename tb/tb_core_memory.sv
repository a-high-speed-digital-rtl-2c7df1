// tb_core_memory -- writes random words to random addresses, reads them
// back one clock later, and checks a read-modify-write stream (read in one
// clock, write back the incremented word in the next) and that a read in
// the clock of a write to the same address returns the old word.
module tb_core_memory;
  logic clk = 0;
  always #5 clk = ~clk;
  logic re, we;
  logic [7:0] raddr, waddr;
  logic [17:0] rdata, wdata;
  core_memory #(.AW(8), .DW(18)) dut (.*);

  int checks = 0, failures = 0;
  logic [17:0] model [256];

  initial begin
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = 18'($urandom); model[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom_range(255);
      @(negedge clk) re = 1; raddr = 8'(a);
      @(negedge clk) re = 0;
      checks++;
      if (rdata != model[a]) begin failures++; $display("FAIL read %0d", a); end
    end
    // read-modify-write of every word, one per clock
    for (int a = 0; a <= 256; a++) begin
      @(negedge clk);
      if (a > 0) begin
        checks++;
        if (rdata != model[a-1]) begin failures++; $display("FAIL rmw read %0d", a - 1); end
        we = 1; waddr = 8'(a - 1); wdata = rdata + 18'd1; model[a-1] = rdata + 18'd1;
      end
      re = (a < 256); raddr = 8'(a);
    end
    @(negedge clk) we = 0; re = 0;
    // read during a write to the same address gives the old word
    @(negedge clk) re = 1; raddr = 8'd5; we = 1; waddr = 8'd5; wdata = ~model[5];
    @(negedge clk) re = 0; we = 0;
    checks++;
    if (rdata != model[5]) begin failures++; $display("FAIL read-before-write"); end
    model[5] = ~model[5];
    for (int a = 0; a < 256; a++) begin
      @(negedge clk) re = 1; raddr = 8'(a);
      @(negedge clk) re = 0;
      checks++;
      if (rdata != model[a]) begin failures++; $display("FAIL final %0d", a); end
    end
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

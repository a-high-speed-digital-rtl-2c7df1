// tb_var_delay -- feeds a numbered stream through a 16-deep variable delay
// for every length 1..16 and checks that each output word is the input of
// exactly len clocks earlier.
module tb_var_delay;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [4:0]  len;
  logic [15:0] din, dout;
  var_delay #(.W(16), .DEPTH(16)) dut (.*);

  int checks = 0, failures = 0;
  int t = 0;
  initial begin
    din = 0; len = 1;
    for (int l = 1; l <= 16; l++) begin
      len = 5'(l);
      for (int n = 0; n < 40; n++) begin
        @(negedge clk);
        // the input given at clock t is the value t
        if (n >= l) begin
          checks++;
          if (int'(dout) != t - l + 1) begin
            failures++;
            if (failures < 10) $display("FAIL len %0d got %0d want %0d", l, dout, t - l + 1);
          end
        end
        din = 16'(t + 1);
        @(posedge clk);
        t++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial din = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

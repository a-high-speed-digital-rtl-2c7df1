// tb_seg_shift_reg -- self-checking test of the switched shift register.
//
// A 64-word register gets a new random word every clock.  In about a third
// of the clocks a random tap (1..63 words behind the input) is replaced by
// another random word.  A model keeps, for every input clock, the word that
// should be in the chain from that clock on.  Each clock it checks dout
// (the word from 64 clocks ago, or its replacement) and tap_q (the word
// from tap_len clocks ago).
module tb_seg_shift_reg;
  localparam int W = 26, DEPTH = 64, T = 3000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [W-1:0] din, dout, tap_din, tap_q;
  logic [5:0]   tap_len;
  logic         tap_we;
  seg_shift_reg #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model [T];

  initial begin
    din = '0; tap_din = '0; tap_len = 6'd1; tap_we = 0;
    for (int t = 0; t < T; t++) begin
      @(negedge clk);
      din     = W'($urandom);
      tap_din = W'($urandom);
      tap_len = 6'($urandom_range(63, 1));
      tap_we  = (t >= DEPTH) && ($urandom_range(2) == 0);
      #1;
      if (t >= DEPTH) begin
        checks++;
        if (dout !== model[t - DEPTH]) begin
          failures++;
          if (failures < 10) $display("FAIL dout t=%0d got %h want %h", t, dout, model[t - DEPTH]);
        end
        checks++;
        if (tap_q !== model[t - int'(tap_len)]) begin
          failures++;
          if (failures < 10) $display("FAIL tap_q t=%0d len=%0d", t, tap_len);
        end
      end
      model[t] = din;
      if (tap_we) model[t - int'(tap_len)] = tap_din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (T + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

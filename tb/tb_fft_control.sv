// tb_fft_control -- sequencing of a 16-point set (the document's example).
// The longest variable delay is set to 2 here, so pass 1 (D = 4) reorders
// through register B and takes 8+6 clocks, while passes 2 and 3 use the
// variable delays and take 8+6+D clocks (D = 2, 1).  The last pass takes
// 8+6.  Checks: 16 load requests in order; the pass lengths 14, 16, 15, 14;
// seg_pass in pass 1 only; 8 results (res_valid) per pass; the one-hot pass
// register; the twiddle angle of every
// pair (Z = bitrev(group) * N/2^p, group = c / (N/2^p)); 8 register writes per
// pass; the switch changing every D clocks; and the output locations
// 0,2,..,14,1,3,..,15.
module tb_fft_control;
  localparam int LOG2N = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic start, start_ack, ld_req, ldw_valid, in_pass, pass_start, last_pass;
  logic sw_pos, wr_en, out_phase, out_first, out_sel_b, done, busy;
  logic seg_pass, res_valid;
  logic [3:0] log2n;
  logic [LOG2N-1:0] ld_idx, ldw_idx, pass_sr, out_loc;
  logic [11:0] tw_angle;
  logic [LOG2N-2:0] dly_len;
  fft_control #(.LOG2N(LOG2N), .LAT(6), .IN_LAT(5), .VD_MAX(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  int cyc = 0, pass_no = 0, pass_t0 = 0, cnt = 0, nwr = 0, nreq = 0, nout = 0, nres = 0;
  int pass_len [5];
  int exp_loc [16] = '{0,2,4,6,8,10,12,14,1,3,5,7,9,11,13,15};
  logic prev_sw;
  int last_toggle;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && ld_req) begin
      chk(int'(ld_idx) == nreq, "load index");
      nreq++;
    end
    if (rst_n && pass_start) begin
      if (pass_no > 0) pass_len[pass_no] = cyc - pass_t0;
      if (pass_no > 0) chk(nwr == 8, $sformatf("writes in pass %0d: %0d", pass_no, nwr));
      if (pass_no > 0) chk(nres == 8, $sformatf("results in pass %0d: %0d", pass_no, nres));
      pass_no++;
      pass_t0 = cyc;
      nwr = 0;
      nres = 0;
      chk(seg_pass == (pass_no == 1), $sformatf("seg_pass in pass %0d", pass_no));
      chk(pass_sr == 4'(1 << (pass_no - 1)), "pass register");
    end
    if (rst_n && in_pass) begin
      int c, g, d, z;
      c = cyc - pass_t0;
      if (c < 8) begin
        d = 16 >> pass_no;               // pair distance
        g = c / d;                       // group number
        z = 0;
        for (int i = 0; i < pass_no - 1; i++) if (((g >> i) & 1) != 0) z |= 1 << (pass_no - 2 - i);
        z = z * d;
        chk(int'(tw_angle) == z * 256, $sformatf("angle pass %0d c %0d got %0d want %0d",
                                                pass_no, c, tw_angle, z * 256));
      end
      if (wr_en) nwr++;
      if (res_valid) nres++;
      if (!last_pass && c >= 6) begin
        if (c == 6) begin prev_sw = sw_pos; last_toggle = 0; end
        else if (sw_pos != prev_sw) begin
          chk((c - 6) % (8 >> pass_no) == 0, "switch period");
          prev_sw = sw_pos;
        end
      end
    end
    if (rst_n && out_first) begin
      pass_len[pass_no] = cyc - pass_t0;
      chk(nwr == 8, "writes in last pass");
    end
    if (rst_n && out_phase) begin
      chk(int'(out_loc) == exp_loc[nout], $sformatf("out loc %0d", nout));
      nout++;
    end
  end

  initial begin
    start = 0; log2n = 4;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(posedge clk);
    while (!start_ack) @(posedge clk);
    @(negedge clk) start = 0;
    wait (done);
    repeat (3) @(posedge clk);
    chk(nreq == 16, "16 requests");
    chk(pass_no == 4, "4 passes");
    chk(pass_len[1] == 14 && pass_len[2] == 16 && pass_len[3] == 15 && pass_len[4] == 14,
        $sformatf("pass lengths %0d %0d %0d %0d", pass_len[1], pass_len[2], pass_len[3], pass_len[4]));
    chk(nout == 16, "16 outputs");
    chk(!busy, "idle at the end");
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

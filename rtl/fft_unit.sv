// fft_unit -- reiterative shift-register FFT with block scaling and
// power-spectrum output.
//
// Two circulating shift registers, A and B, of N/2 complex words each hold
// the data set; they shift on every clock and are never stopped.  Each pass
// feeds the word pairs leaving A and B, together with a twiddle factor from
// the sine-cosine generator, through the pipelined arithmetic unit
// (fft_butterfly).  Between passes the results are reordered without
// addressing, with a distance D = N/2^(p+1) and a switch that changes every
// D clocks (all sequencing in fft_control):
//   D <= VD_MAX (64)  the B' stream goes through a variable delay of D, the
//                     switch exchanges the A' and delayed-B' paths, and a
//                     second variable delay of D in front of register A
//                     removes the stagger.  This costs D clocks per pass.
//   D >  VD_MAX       register B (seg_shift_reg) is the delay.  B' always
//                     enters B.  In the first D clocks of every 2D, A' enters
//                     A.  In the second D clocks, the B' word that entered B
//                     D clocks earlier leaves B at the switched boundary and
//                     enters A.  The current A' takes that word's place in
//                     B, so it comes out D clocks early, beside its partner.
//                     No clocks are lost.
// After the last pass register A holds
// the even-numbered pair members, B the odd ones, in bit-reversed frequency
// order; the output phase reads A then B, one word per clock, squares the
// real and imaginary parts (the extra power pass) and gives each word its
// frequency bin, the bit-reversed location.
//
// Block scaling: while a pass's results (or the loaded words) are formed,
// any component with |x| >= 1024 (top three bits not all equal)
// sets a flag.  A flagged pass halves its results and increments the block
// exponent, so no word can overflow 13 bits (|A +- BW| < 2*sqrt(2)*1024
// otherwise).  The block exponent is common to the whole array; a power
// value stands for out_re2 * 4^out_exp.
//
// Interface: start/start_ack and log2n (passes) begin a set; the unit asks
// for its words with ld_req/ld_idx and expects each ld_data exactly IN_LAT
// clocks later.  Results appear on out_* with out_valid, N consecutive
// clocks, one clock after the output phase reads them.
// Timing per set: N (load) + sum over passes of (N/2 + 6 + D'_p) + N
// (output), where D'_p = D_p for variable-delay passes and 0 otherwise.
// For N = 4096 that is 24,775 clocks of passes: the document gives
// 128 + N/2 log2 N, which leaves out the 6-clock pipeline fill.  The next
// set's load overlaps the output phase when start is already held during
// the last pass.  The two reordering formats and their split at 64 follow
// the document.  Modelling register B as a memory with a moving tap is this
// design's choice.
module fft_unit
  import dfa_pkg::*;
#(
  parameter int unsigned LOG2N  = LOG2N_MAX,
  parameter int unsigned IN_LAT = 5,
  parameter int unsigned VD_MAX = 64     // longest variable delay
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [3:0]        log2n,
  output logic              start_ack,
  output logic              ld_req,
  output logic [LOG2N-1:0]  ld_idx,
  input  cplx_t             ld_data,
  output logic              out_valid,
  output logic [LOG2N-1:0]  out_bin,
  output logic [PWRW-1:0]   out_re2,
  output logic [PWRW-1:0]   out_im2,
  output logic [EXPW-1:0]   out_exp,
  output logic              out_last,
  output logic              busy,
  output logic              scale_event   // a pass was scaled (for monitoring)
);
  localparam int unsigned HALF = 1 << (LOG2N - 1);
  localparam int unsigned LAT  = 6;
  localparam int unsigned VDD  = (HALF/2 < VD_MAX) ? HALF/2 : VD_MAX;

  // ---- control
  logic             ldw_valid, in_pass, pass_start, last_pass, sw_pos, wr_en;
  logic             seg_pass, res_valid;
  logic             out_phase, out_first, out_sel_b, done;
  logic [LOG2N-1:0] ldw_idx, pass_sr, out_loc;
  logic [11:0]      tw_angle;
  logic [LOG2N-2:0] dly_len;

  fft_control #(.LOG2N(LOG2N), .LAT(LAT), .IN_LAT(IN_LAT), .VD_MAX(VD_MAX)) u_ctl (
    .clk, .rst_n, .start, .log2n, .start_ack, .ld_req, .ld_idx,
    .ldw_valid, .ldw_idx, .in_pass, .pass_start, .last_pass, .pass_sr,
    .tw_angle, .sw_pos, .dly_len, .seg_pass, .res_valid, .wr_en,
    .out_phase, .out_first,
    .out_sel_b, .out_loc, .done, .busy
  );

  // ---- shift registers A (fixed delay of N/2) and B (N/2, switched)
  cplx_t sra_in, srb_in, sra_q, srb_q, srb_tap;
  logic  tap_we;
  cplx_t a_res, b_res;
  var_delay #(.W($bits(cplx_t)), .DEPTH(HALF)) u_sra (
    .clk, .len(LOG2N'(HALF)), .din(sra_in), .dout(sra_q));
  seg_shift_reg #(.W($bits(cplx_t)), .DEPTH(HALF)) u_srb (
    .clk, .din(srb_in), .dout(srb_q), .tap_len(dly_len),
    .tap_we, .tap_din(a_res), .tap_q(srb_tap));

  // ---- align the register outputs with the sine-cosine latency (3)
  cplx_t   a_d [3];
  cplx_t   b_d [3];
  always_ff @(posedge clk) begin
    a_d[0] <= sra_q;  b_d[0] <= srb_q;
    a_d[1] <= a_d[0]; b_d[1] <= b_d[0];
    a_d[2] <= a_d[1]; b_d[2] <= b_d[1];
  end

  sample_t wc, ws;
  sincos_gen u_trig (.clk, .angle(tw_angle), .cos_o(wc), .sin_o(ws));

  logic  scale_cur;
  fft_butterfly u_au (
    .clk, .a(a_d[2]), .b(b_d[2]), .wc, .ws, .scale(scale_cur),
    .a_o(a_res), .b_o(b_res));

  // ---- short reordering: B' delay, switch, delay in front of register A
  localparam int unsigned VLW = $clog2(VDD) + 1;
  cplx_t db_res, path_a, path_b, path_a_d;
  logic [VLW-1:0] vd_len;
  assign vd_len = seg_pass ? VLW'(1) : VLW'(dly_len);
  var_delay #(.W($bits(cplx_t)), .DEPTH(VDD)) u_bdly (
    .clk, .len(vd_len), .din(b_res), .dout(db_res));

  always_comb begin
    path_a = sw_pos ? db_res : a_res;    // towards register A (delayed)
    path_b = sw_pos ? a_res  : db_res;   // towards register B
  end

  var_delay #(.W($bits(cplx_t)), .DEPTH(VDD)) u_adly (
    .clk, .len(vd_len), .din(path_a), .dout(path_a_d));

  // ---- long reordering through register B
  assign tap_we = wr_en && seg_pass && sw_pos;

  always_comb begin
    sra_in = sra_q;                      // recirculate by default
    srb_in = srb_q;
    if (ldw_valid) begin
      if (ldw_idx[LOG2N-1]) srb_in = ld_data;
      else                  sra_in = ld_data;
    end else if (wr_en) begin
      if (last_pass) begin
        sra_in = a_res;
        srb_in = b_res;
      end else if (seg_pass) begin
        sra_in = sw_pos ? srb_tap : a_res;
        srb_in = b_res;
      end else begin
        sra_in = path_a_d;
        srb_in = path_b;
      end
    end
  end

  // ---- block scaling
  function automatic logic big(input cplx_t w);
    return (w.re[DW-1:DW-3] != 3'b000 && w.re[DW-1:DW-3] != 3'b111) ||
           (w.im[DW-1:DW-3] != 3'b000 && w.im[DW-1:DW-3] != 3'b111);
  endfunction

  logic             ovf;
  logic [EXPW-1:0]  exp_acc;
  logic             first_ld;
  assign first_ld = ldw_valid && (ldw_idx == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ovf       <= 1'b0;
      exp_acc   <= '0;
      scale_cur <= 1'b0;
      out_exp   <= '0;
    end else begin
      if (pass_start) begin
        scale_cur <= ovf;
        exp_acc   <= exp_acc + EXPW'(ovf);
      end
      if (out_first) out_exp <= exp_acc;
      if (first_ld) begin
        exp_acc <= '0;
        ovf     <= big(ld_data);
      end else if (ldw_valid) begin
        ovf <= ovf | big(ld_data);
      end else if (pass_start) begin
        ovf <= 1'b0;
      end else if (res_valid && !last_pass) begin
        ovf <= ovf | big(a_res) | big(b_res);
      end
    end
  end
  assign scale_event = pass_start && ovf;

  // ---- output phase: power detection
  cplx_t w_out;
  assign w_out = out_sel_b ? srb_q : sra_q;

  function automatic logic [PWRW-1:0] sq(input sample_t x);
    logic [DW-1:0] m;
    m = x[DW-1] ? DW'(-x) : DW'(x);
    if (m > DW'(4095)) m = DW'(4095);    // -4096 saturates
    return PWRW'(m) * PWRW'(m);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= out_phase;
      out_last  <= done;
    end
  end
  always_ff @(posedge clk) begin
    out_re2 <= sq(w_out.re);
    out_im2 <= sq(w_out.im);
    for (int i = 0; i < int'(LOG2N); i++) out_bin[i] <= out_loc[LOG2N-1-i];
  end

  logic unused;
  assign unused = ^pass_sr;

endmodule

// fft_control -- hard-wired timing control of the shift-register FFT.
//
// The control is a main counter, a pass-number shift register and a load
// counter.  A set of N = 2^LOG2N complex words (N/2 in each of the two
// circulating shift registers A and B) goes through these phases:
//
//   load    the words are requested (ld_req/ld_idx) and arrive IN_LAT clocks
//           later; the first N/2 go to register A, the last N/2 to register B.
//   pass p  (p = 1..passes) the registers shift out N/2 word pairs (A, B) whose
//           locations differ by N/2^p.  Pair c (c = cnt) is rotated by
//           W = exp(-j 2 pi Z/N), Z = bitrev(group) * N/2^p, group = c / (N/2^p):
//           the sine-cosine address counter with its bits used in reverse
//           order.  The results leave the arithmetic unit LAT clocks later
//           (res_valid).  Every pass but the last reorders them for the next
//           pass with a distance D = N/2^(p+1), switching every D clocks
//           (sw_pos), in one of two ways:
//             D <= VD_MAX  variable delays (seg_pass = 0): B' is delayed by
//                          D, a switch exchanges the A' and delayed-B' paths,
//                          and the path into register A is delayed by D
//                          again.  The pass lasts N/2 + LAT + D clocks.
//             D >  VD_MAX  switched register B (seg_pass = 1): register B
//                          itself serves as the delay of D, and the pass
//                          lasts N/2 + LAT clocks.
//           The last pass writes A' and B' straight back (N/2 + LAT clocks).
//   output  N clocks: register A then register B is read out, one word per
//           clock with its location; a new set may be loaded at the same time.
//
// Fewer than LOG2N passes (log2n input) leave 2^(LOG2N-log2n) interlaced
// transforms of 2^log2n points, one per input channel.
// The counter structure, the pass shift register, and the split between
// variable delays (up to 64) and switched segments follow the document.
// The exact phase boundaries are this design's.
//
// start is held until start_ack.  A start is taken when idle, or during the
// last pass so that its words arrive exactly as the output phase begins.
module fft_control #(
  parameter int unsigned LOG2N  = 12,
  parameter int unsigned LAT    = 6,      // SR output to butterfly output
  parameter int unsigned IN_LAT = 5,      // ld_req to load word
  parameter int unsigned VD_MAX = 64      // longest variable delay
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [3:0]        log2n,        // passes, 1..LOG2N
  output logic              start_ack,
  // load request side
  output logic              ld_req,
  output logic [LOG2N-1:0]  ld_idx,
  // load data side (IN_LAT later)
  output logic              ldw_valid,
  output logic [LOG2N-1:0]  ldw_idx,
  // pass control
  output logic              in_pass,
  output logic              pass_start,   // first clock of a pass
  output logic              last_pass,
  output logic [LOG2N-1:0]  pass_sr,      // one-hot pass number
  output logic [11:0]       tw_angle,     // twiddle angle, 4096 per turn
  output logic              sw_pos,       // 0: A'->A path, dB'->B ; 1: swapped
  output logic [LOG2N-2:0]  dly_len,      // D of this pass (>=1)
  output logic              seg_pass,     // reorder through register B
  output logic              res_valid,    // butterfly results of this pass
  output logic              wr_en,        // SR inputs take the pass results
  // output phase
  output logic              out_phase,
  output logic              out_first,    // first clock of the output phase
  output logic              out_sel_b,
  output logic [LOG2N-1:0]  out_loc,
  output logic              done,         // last clock of the output phase
  output logic              busy
);
  localparam int unsigned HALF = 1 << (LOG2N - 1);
  localparam int unsigned CW   = LOG2N + 1;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_PASS, S_OUT} state_e;
  state_e state;

  logic [CW-1:0]    cnt;
  logic [3:0]       pnum;                 // 1..LOG2N
  logic [3:0]       g_next, g_cur;        // pass counts latched at start
  logic             ovl;                  // a load overlaps the output phase
  logic             iss;                  // issuing load requests
  logic [LOG2N-1:0] iss_idx;

  logic [IN_LAT-1:0] ldv_pipe;
  logic [LOG2N-1:0]  ldi_pipe [IN_LAT];

  // ---- per-pass values
  logic [CW-1:0] dlen, plen;
  logic [3:0]    dbit;                    // log2(D)
  always_comb begin
    last_pass = (pnum == g_cur);
    dbit      = 4'(LOG2N - 1) - pnum;
    dlen      = last_pass ? '0 : CW'(1) << dbit;
    seg_pass  = (dlen > CW'(VD_MAX));
    plen      = CW'(HALF) + CW'(LAT) + (seg_pass ? '0 : dlen);
  end

  // ---- start / load issue
  logic take_ovl;
  assign take_ovl  = (state == S_PASS) && last_pass && !iss &&
                     (cnt == CW'(HALF + LAT - IN_LAT - 1));
  assign start_ack = start && !iss && ((state == S_IDLE) || take_ovl);
  assign ld_req    = iss;
  assign ld_idx    = iss_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iss     <= 1'b0;
      iss_idx <= '0;
    end else if (start_ack) begin
      iss     <= 1'b1;
      iss_idx <= '0;
    end else if (iss) begin
      iss_idx <= iss_idx + 1'b1;
      if (iss_idx == LOG2N'(2*HALF - 1)) iss <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ldv_pipe <= '0;
    else        ldv_pipe <= {ldv_pipe[IN_LAT-2:0], iss};
  end
  always_ff @(posedge clk) begin
    ldi_pipe[0] <= iss_idx;
    for (int i = 1; i < int'(IN_LAT); i++) ldi_pipe[i] <= ldi_pipe[i-1];
  end
  assign ldw_valid = ldv_pipe[IN_LAT-1];
  assign ldw_idx   = ldi_pipe[IN_LAT-1];

  logic load_last;
  assign load_last = ldw_valid && (ldw_idx == LOG2N'(2*HALF - 1));

  // ---- main state machine and counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      g_next  <= 4'(LOG2N);
      g_cur   <= 4'(LOG2N);
      cnt     <= '0;
      pnum    <= 4'd1;
      pass_sr <= '0;
      ovl     <= 1'b0;
    end else begin
      if (start_ack) g_next <= log2n;
      unique case (state)
        S_IDLE: if (start_ack) state <= S_LOAD;
        S_LOAD: if (load_last) begin
          state   <= S_PASS;
          g_cur   <= g_next;
          cnt     <= '0;
          pnum    <= 4'd1;
          pass_sr <= LOG2N'(1);
        end
        S_PASS: begin
          if (take_ovl && start) ovl <= 1'b1;
          if (cnt == plen - 1'b1) begin
            cnt <= '0;
            if (last_pass) begin
              state   <= S_OUT;
              pass_sr <= '0;
            end else begin
              pnum    <= pnum + 1'b1;
              pass_sr <= pass_sr << 1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_OUT: begin
          if (cnt == CW'(2*HALF - 1)) begin
            cnt <= '0;
            ovl <= 1'b0;
            if (ovl) begin
              state   <= S_PASS;
              g_cur   <= g_next;
              pnum    <= 4'd1;
              pass_sr <= LOG2N'(1);
            end else begin
              state <= S_IDLE;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---- pass outputs
  logic [LOG2N-2:0] c;          // pair index on the read side
  logic [CW-1:0]    co;         // pair index on the result side
  logic [LOG2N-2:0] rev, grp_mask;
  logic [LOG2N-1:0] z;

  always_comb begin
    in_pass    = (state == S_PASS);
    pass_start = in_pass && (cnt == '0);
    c          = cnt[LOG2N-2:0];
    // twiddle: keep the top p-1 bits of c, reversed, weighted N/2^p
    for (int i = 0; i < int'(LOG2N) - 1; i++) rev[i] = c[LOG2N-2-i];
    grp_mask = (LOG2N-1)'((1 << (pnum - 1)) - 1);
    z        = LOG2N'(rev & grp_mask) << (4'(LOG2N) - pnum);
    tw_angle = 12'(z) << (12 - LOG2N);
    co       = cnt - CW'(LAT);
    sw_pos   = co[dbit];
    dly_len  = last_pass ? (LOG2N-1)'(1) : dlen[LOG2N-2:0];
    wr_en    = in_pass && (cnt >= CW'(LAT) + (seg_pass ? '0 : dlen));
    res_valid = in_pass && (cnt >= CW'(LAT)) && (cnt < CW'(LAT + HALF));
  end

  // ---- output phase: location of the word being read
  logic [LOG2N-1:0] j;
  logic [3:0]       b;           // location bit that tells A from B words
  always_comb begin
    out_phase = (state == S_OUT);
    out_first = out_phase && (cnt == '0);
    j         = cnt[LOG2N-1:0];
    out_sel_b = j[LOG2N-1];
    b         = 4'(LOG2N) - g_cur;
    out_loc   = ((LOG2N'(j[LOG2N-2:0]) >> b) << (b + 1)) |
                (LOG2N'(out_sel_b) << b) |
                (LOG2N'(j[LOG2N-2:0]) & ((LOG2N'(1) << b) - 1'b1));
    done      = out_phase && (cnt == CW'(2*HALF - 1));
    busy      = (state != S_IDLE) || iss;
  end

endmodule

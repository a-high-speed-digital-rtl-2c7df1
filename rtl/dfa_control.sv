// dfa_control -- control register and hard-wired program of the analyzer.
//
// Holds the 40-bit control register (layout in dfa_pkg::ctrl_t), loaded
// either from the front panel or from the computer; the computer wins when
// both load in the same clock.  The program it runs is fixed: while run is
// set, each block of samples completed in core is taken and the FFT unit
// is asked to load it (fft_start held until fft_ack); the FFT's words are
// read from the block's half of the input region (ld_half, latched at the
// acknowledge so that a later request cannot disturb a load in progress).
// Loading the control register restarts the postprocessing filters: the
// first set transformed afterwards is marked so that its bins are written
// without the old value (pp_first during that set's output).  A two-entry
// queue carries that mark from a set's start to its output, since the next
// set is started before the previous one is output.
// The document gives the register's width, its two sources and a hard-wired
// program; the field layout and the sequencing details are this design's.
module dfa_control
  import dfa_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              panel_ld,
  input  logic [CTRLW-1:0]  panel_data,
  input  logic              host_ld,
  input  logic [CTRLW-1:0]  host_data,
  output ctrl_t             ctrl,
  // blocks in core
  input  logic              blk_pending,
  input  logic              blk_half,
  output logic              blk_take,
  // FFT unit
  output logic              fft_start,
  output logic [3:0]        fft_log2n,
  input  logic              fft_ack,
  output logic              ld_half,
  input  logic              fft_out_valid,
  input  logic              fft_out_last,
  // postprocessing
  output logic              pp_first,
  output logic [15:0]       sets_done
);
  logic req_half, first_pending;
  logic [1:0] fq;          // first-marks of sets in flight, oldest in bit 0
  logic [1:0] fq_n;        // number of sets in flight

  assign fft_log2n = (ctrl.log2n == 4'd0 || ctrl.log2n > 4'(LOG2N_MAX)) ?
                     4'(LOG2N_MAX) : ctrl.log2n;
  assign blk_take  = ctrl.run && blk_pending && !fft_start;
  assign pp_first  = fq[0] && fft_out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl          <= '0;
      fft_start     <= 1'b0;
      req_half      <= 1'b0;
      ld_half       <= 1'b0;
      first_pending <= 1'b1;
      fq            <= '0;
      fq_n          <= '0;
      sets_done     <= '0;
    end else begin
      if (host_ld)       ctrl <= ctrl_t'(host_data);
      else if (panel_ld) ctrl <= ctrl_t'(panel_data);
      if (host_ld || panel_ld) first_pending <= 1'b1;

      if (blk_take) begin
        fft_start <= 1'b1;
        req_half  <= blk_half;
      end else if (fft_ack) begin
        fft_start <= 1'b0;
      end

      // queue of first-marks: push at acknowledge, pop at the end of output
      unique case ({fft_start && fft_ack, fft_out_last})
        2'b10: begin
          fq[fq_n[0]] <= first_pending;
          fq_n        <= fq_n + 1'b1;
        end
        2'b01: begin
          fq   <= {1'b0, fq[1]};
          fq_n <= fq_n - 1'b1;
        end
        2'b11: begin
          fq   <= fq_n[1] ? {first_pending, fq[1]} : {1'b0, first_pending};
        end
        default: ;
      endcase
      if (fft_start && fft_ack) begin
        ld_half <= req_half;
        if (!(host_ld || panel_ld)) first_pending <= 1'b0;
      end
      if (fft_out_last) sets_done <= sets_done + 1'b1;
    end
  end
endmodule

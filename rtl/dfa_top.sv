// dfa_top -- the digital Fourier analyzer.
//
// Samples from two 8-bit A/D converters (I and Q) are stored in the input
// region of core by input_capture.  Each completed block of 2^LOG2N samples
// is, under dfa_control, read out of core, optionally Hanning weighted
// (hanning_weight) and loaded into the shift-register FFT (fft_unit), which
// transforms it as one set of 2^LOG2N points or as M interlaced sets of
// 2^log2n points (M = 2^(LOG2N-log2n) input channels).  The output pass of
// the FFT delivers the squared real and imaginary parts of every bin with
// the block exponent; postproc_unit converts them to floating point and
// updates the bin's filter word in the filter region of core with a
// read-modify-write (bypass, integrator or first-order recursive filter).
// The computer or display reads the filter words through the host read
// port.  Bin n of channel c lives at filter address
// {bank, bitrev(c) (LOG2N-log2n bits), n (log2n bits)}.
//
// The A/D converters, the display and the computer are outside this
// design; their digital signals are the ports.  The document's single
// shared core memory is modelled as two regions with their own ports.
//
// Timing (LOG2N = 12): a set needs 4096 clocks of load, 24,775 clocks of
// passes and 4096 clocks of output, the load of the next set overlapping
// the output.  Host reads take effect one clock after the request and are
// refused (host_rd_valid low) while the postprocessing unit is updating.
module dfa_top
  import dfa_pkg::*;
#(
  parameter int unsigned LOG2N = LOG2N_MAX
) (
  input  logic              clk,
  input  logic              rst_n,
  // A/D converters
  input  logic              adc_valid,
  input  logic [7:0]        adc_i,
  input  logic [7:0]        adc_q,
  // control register sources
  input  logic              panel_ld,
  input  logic [CTRLW-1:0]  panel_data,
  input  logic              host_ld,
  input  logic [CTRLW-1:0]  host_data,
  // computer / display read of the filter bins
  input  logic              host_rd_en,
  input  logic [LOG2N:0]    host_rd_addr,
  output logic              host_rd_valid,
  output fword_t            host_rd_data,
  // status
  output logic              busy,
  output logic              overrun,
  output logic [15:0]       sets_done
);
  localparam int unsigned IN_LAT = 5;   // core read (1) + Hanning (4)

  ctrl_t ctrl;

  // ---- input region of core
  logic             in_we, blk_pending, blk_half, blk_take;
  logic [LOG2N:0]   in_waddr;
  logic [15:0]      in_wdata, in_rdata;
  logic             ld_req, ld_half;
  logic [LOG2N-1:0] ld_idx;

  input_capture #(.LOG2B(LOG2N)) u_in (
    .clk, .rst_n, .adc_valid, .adc_i, .adc_q, .cplx_in(ctrl.cplx_in),
    .mem_we(in_we), .mem_waddr(in_waddr), .mem_wdata(in_wdata),
    .blk_pending, .blk_half, .blk_take, .overrun);

  core_memory #(.AW(LOG2N+1), .DW(16)) u_core_in (
    .clk, .re(ld_req), .raddr({ld_half, ld_idx}), .rdata(in_rdata),
    .we(in_we), .waddr(in_waddr), .wdata(in_wdata));

  // ---- control
  logic       fft_start, fft_ack, fft_out_valid, fft_out_last, pp_first;
  logic [3:0] fft_log2n;

  dfa_control u_ctl (
    .clk, .rst_n, .panel_ld, .panel_data, .host_ld, .host_data, .ctrl,
    .blk_pending, .blk_half, .blk_take, .fft_start, .fft_log2n,
    .fft_ack, .ld_half, .fft_out_valid, .fft_out_last, .pp_first, .sets_done);

  // ---- Hanning weighting on the way into the FFT
  logic [LOG2N-1:0] idx_d;
  cplx_t            smp, ld_data;
  always_ff @(posedge clk) idx_d <= ld_idx;
  always_comb begin
    smp.re = sample_t'({{(DW-12){in_rdata[15]}}, in_rdata[15:8], 4'b0});
    smp.im = sample_t'({{(DW-12){in_rdata[7]}},  in_rdata[7:0],  4'b0});
  end

  hanning_weight #(.LOG2N(LOG2N)) u_han (
    .clk, .enable(ctrl.hanning), .log2n(fft_log2n), .idx(idx_d),
    .din(smp), .dout(ld_data));

  // ---- FFT unit
  logic [LOG2N-1:0] out_bin;
  logic [PWRW-1:0]  out_re2, out_im2;
  logic [EXPW-1:0]  out_exp;
  logic             scale_event;

  fft_unit #(.LOG2N(LOG2N), .IN_LAT(IN_LAT)) u_fft (
    .clk, .rst_n, .start(fft_start), .log2n(fft_log2n), .start_ack(fft_ack),
    .ld_req, .ld_idx, .ld_data, .out_valid(fft_out_valid), .out_bin,
    .out_re2, .out_im2, .out_exp, .out_last(fft_out_last), .busy,
    .scale_event);

  // ---- postprocessing and the filter region of core
  logic           pp_re, pp_we, pp_drop, pp_clip;
  logic [LOG2N:0] pp_raddr, pp_waddr;
  fword_t         flt_rdata, pp_wdata;

  postproc_unit #(.AW(LOG2N+1)) u_pp (
    .clk, .rst_n, .in_valid(fft_out_valid), .in_addr({ctrl.bank, out_bin}),
    .in_re2(out_re2), .in_im2(out_im2), .in_exp(out_exp),
    .mode(ctrl.pp_mode), .k(ctrl.k), .first(pp_first),
    .mem_re(pp_re), .mem_raddr(pp_raddr), .mem_rdata(flt_rdata),
    .mem_we(pp_we), .mem_waddr(pp_waddr), .mem_wdata(pp_wdata),
    .drop(pp_drop), .clip(pp_clip));

  logic host_take;
  assign host_take = host_rd_en && !pp_re;

  core_memory #(.AW(LOG2N+1), .DW(FWORDW)) u_core_flt (
    .clk, .re(pp_re || host_take), .raddr(pp_re ? pp_raddr : host_rd_addr),
    .rdata(flt_rdata), .we(pp_we), .waddr(pp_waddr), .wdata(pp_wdata));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) host_rd_valid <= 1'b0;
    else        host_rd_valid <= host_take;
  end
  assign host_rd_data = flt_rdata;

  logic unused;
  assign unused = ^{ctrl.spare, ctrl.run, scale_event, pp_drop, pp_clip};

endmodule

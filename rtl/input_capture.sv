// input_capture -- multiplexing of A/D samples into the core input region.
//
// Each strobe of the converters stores one sample word, I in the upper and
// Q in the lower byte (Q is stored as zero for real inputs), at the next
// address of a circular region of 2 * 2^LOG2B words.  Every 2^LOG2B words
// complete a block; the block's half of the region is then offered to the
// sequencer (blk_pending, blk_half) until it is taken with blk_take.  If a
// block completes while the previous one is still pending, the older one is
// lost and overrun pulses.  Samples of several channels are simply stored
// in their order of arrival (channel-interlaced).
// The document says only that sampled data are stored in core for
// multiplexing of data sets and handed on in 4096-sample blocks; the double
// buffering and the overrun rule are this design's.
//
// Timing: the core write happens in the clock of the strobe.
module input_capture #(
  parameter int unsigned LOG2B = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             adc_valid,
  input  logic [7:0]       adc_i,
  input  logic [7:0]       adc_q,
  input  logic             cplx_in,
  // core memory, input region
  output logic             mem_we,
  output logic [LOG2B:0]   mem_waddr,
  output logic [15:0]      mem_wdata,
  // block hand-over
  output logic             blk_pending,
  output logic             blk_half,
  input  logic             blk_take,
  output logic             overrun
);
  logic [LOG2B:0] wptr;
  logic           blk_end;

  assign mem_we    = adc_valid;
  assign mem_waddr = wptr;
  assign mem_wdata = {adc_i, cplx_in ? adc_q : 8'h00};
  assign blk_end   = adc_valid && (wptr[LOG2B-1:0] == '1);
  assign overrun   = blk_end && blk_pending && !blk_take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr        <= '0;
      blk_pending <= 1'b0;
      blk_half    <= 1'b0;
    end else begin
      if (adc_valid) wptr <= wptr + 1'b1;
      if (blk_end) begin
        blk_pending <= 1'b1;
        blk_half    <= wptr[LOG2B];
      end else if (blk_take) begin
        blk_pending <= 1'b0;
      end
    end
  end
endmodule

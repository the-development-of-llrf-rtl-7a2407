// iq_demod -- IQ demodulation of the sampled 50 MHz IF by IQ sampling.
//
// The IF (50 MHz) is sampled at 40 MHz.  The IF phase then advances by
// 2*pi*50/40 = 2.5*pi, i.e. by +90 degrees modulo 2*pi, from one sample to the
// next, so with x(t) = I*cos(wt) - Q*sin(wt) the samples repeat the pattern
//   I, -Q, -I, Q, I, -Q, ...
// This follows the document (4/5 sampling ratio, "repeating pattern of IQ
// signals" separated by a demodulator).  The choice of which sample is
// labelled I, and the sign convention, are this design's own: they only fix
// a constant phase offset, which is the same for every channel that is reset
// together.
//
// Interface: one ADC sample per clock on `adc`.  A 2-bit counter tracks the
// position in the pattern; samples 0 and 2 (negated) update I, samples 1
// (negated) and 3 update Q.  After every Q update a complete I/Q pair is
// presented on `iq` with `iq_valid` high for one clock, so pairs arrive at
// half the ADC rate (20 MS/s).  Latency: the pair is registered on the clock
// edge that takes in its Q sample.  Negation saturates (-(-32768) = 32767).
module iq_demod
  import llrf_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t adc,       // ADC sample, one per clock
  output iq_t     iq,        // demodulated I/Q pair
  output logic    iq_valid   // one-clock strobe per new pair
);

  logic [1:0] phase_cnt;
  sample_t    i_hold;
  sample_t    adc_neg;

  assign adc_neg = (adc == -16'sd32768) ? 16'sd32767 : -adc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_cnt <= '0;
      i_hold    <= '0;
      iq        <= '0;
      iq_valid  <= 1'b0;
    end else begin
      phase_cnt <= phase_cnt + 2'd1;
      iq_valid  <= 1'b0;
      unique case (phase_cnt)
        2'd0: i_hold <= adc;
        2'd1: begin iq.i <= i_hold; iq.q <= adc_neg; iq_valid <= 1'b1; end
        2'd2: i_hold <= adc_neg;
        2'd3: begin iq.i <= i_hold; iq.q <= adc;     iq_valid <= 1'b1; end
      endcase
    end
  end

endmodule

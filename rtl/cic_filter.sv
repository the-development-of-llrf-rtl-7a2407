// cic_filter -- 3-tap CIC low-pass filter for an I/Q stream.
//
// The document filters the demodulated I and Q with a "3-tap CIC filter" to
// remove the ripple that ADC clock jitter puts on them.  Here that is one
// integrator followed by one comb whose differential delay is TAPS samples:
//   S[n] = S[n-1] + x[n]              (integrator, modulo 2^ACC_W)
//   y[n] = S[n] - S[n-TAPS]           = x[n] + x[n-1] + ... + x[n-TAPS+1]
// The sum is then normalised to unity DC gain by multiplying with
// NORM = round(2^17 / TAPS) and shifting right by 17 with rounding, so a
// constant input comes out unchanged, as on the document's console where the
// filtered words sit at the level of the raw ones.  The single stage, the
// absence of decimation and the normalisation are this design's reading of
// "3-tap"; the document gives no further structure.
//
// Interface: `in_valid` qualifies `in`; one clock later `out` holds the
// filtered pair and `out_valid` pulses.  Integrator wrap-around is harmless
// because the comb difference is taken in the same modulus.
module cic_filter
  import llrf_pkg::*;
#(
  parameter int TAPS = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  iq_t  in,
  output logic out_valid,
  output iq_t  out
);

  localparam int ACC_W  = SAMPLE_W + $clog2(TAPS) + 1;
  localparam int SHIFT  = 17;
  localparam int NORM   = ((1 << SHIFT) + TAPS / 2) / TAPS;
  localparam int PROD_W = ACC_W + SHIFT + 2;

  typedef logic signed [ACC_W-1:0] acc_t;

  // hist[ch][k] = S[n-1-k] for channel ch (0 = I, 1 = Q)
  acc_t    hist [2][TAPS];
  acc_t    acc_new [2];
  acc_t    diff [2];
  sample_t res [2];
  sample_t x [2];

  assign x[0] = in.i;
  assign x[1] = in.q;

  always_comb begin
    for (int ch = 0; ch < 2; ch++) begin
      logic signed [PROD_W-1:0] prod;
      acc_new[ch] = hist[ch][0] + acc_t'(x[ch]);
      diff[ch]    = acc_new[ch] - hist[ch][TAPS-1];
      prod        = PROD_W'(diff[ch]) * PROD_W'(NORM) + (PROD_W'(1) <<< (SHIFT - 1));
      res[ch]     = sat16(64'(prod >>> SHIFT));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int ch = 0; ch < 2; ch++)
        for (int k = 0; k < TAPS; k++)
          hist[ch][k] <= '0;
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int ch = 0; ch < 2; ch++) begin
          hist[ch][0] <= acc_new[ch];
          for (int k = 1; k < TAPS; k++)
            hist[ch][k] <= hist[ch][k-1];
        end
        out.i <= res[0];
        out.q <= res[1];
      end
    end
  end

endmodule

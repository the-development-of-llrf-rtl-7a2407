// pi_ctrl -- proportional-integral controller for one field component.
//
// The document feeds the amplitude error and the phase error each into a PI
// controller whose P and I gains are set from the processor, so that the
// steady-state error goes to zero.  It gives no arithmetic; this design uses
// the plain parallel form, updated once per error sample:
//   integ[n] = clamp(integ[n-1] + ki * err[n])
//   u[n]     = sat16((kp * err[n] + integ[n]) >> GAIN_FRAC)
// Gains are unsigned fixed-point numbers with GAIN_FRAC fractional bits
// (default 8, so 16'h0100 is a gain of 1).  The integrator is clamped to the
// range that maps onto the 16-bit output (anti-windup), so after a large
// error it recovers as soon as the error changes sign.  `saturated` is high
// while the output is clipped.
//
// With WRAP = 1 (used for the phase loop) the integrator and the output are
// instead taken modulo 2^16 output LSBs, i.e. modulo one full turn when the
// output is a phase in the 2^15 = pi scale, so the drive phase can move
// continuously through +-180 degrees; `saturated` then stays low.  The gain
// format, the clamping or wrapping and the zero reset state are this design's
// choices.
//
// Timing: `u` and `u_valid` are registered one clock after `err_valid`.
module pi_ctrl
  import llrf_pkg::*;
#(
  parameter int GAIN_W    = 16,
  parameter int GAIN_FRAC = 8,
  parameter bit WRAP      = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              err_valid,
  input  sample_t           err,
  input  logic [GAIN_W-1:0] kp,
  input  logic [GAIN_W-1:0] ki,
  output logic              u_valid,
  output sample_t           u,
  output logic              saturated
);

  localparam int ACC_W = SAMPLE_W + GAIN_W + 4;
  typedef logic signed [ACC_W-1:0] acc_t;

  localparam acc_t INT_MAX = (acc_t'(1) <<< (SAMPLE_W - 1 + GAIN_FRAC)) - acc_t'(1);
  localparam acc_t INT_MIN = -(acc_t'(1) <<< (SAMPLE_W - 1 + GAIN_FRAC));

  acc_t integ, integ_sum, integ_next, p_term, total, shifted;

  always_comb begin
    p_term    = acc_t'(err) * acc_t'({1'b0, kp});
    integ_sum = integ + acc_t'(err) * acc_t'({1'b0, ki});
    if (WRAP)                     integ_next = acc_t'(signed'(integ_sum[SAMPLE_W+GAIN_FRAC-1:0]));
    else if (integ_sum > INT_MAX) integ_next = INT_MAX;
    else if (integ_sum < INT_MIN) integ_next = INT_MIN;
    else                          integ_next = integ_sum;
    total   = p_term + integ_next;
    shifted = total >>> GAIN_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ     <= '0;
      u         <= '0;
      u_valid   <= 1'b0;
      saturated <= 1'b0;
    end else begin
      u_valid <= err_valid;
      if (err_valid) begin
        integ     <= integ_next;
        if (WRAP) begin
          u         <= shifted[SAMPLE_W-1:0];
          saturated <= 1'b0;
        end else begin
          u         <= sat16(64'(shifted));
          saturated <= (shifted > acc_t'(32767)) || (shifted < acc_t'(-32768));
        end
      end
    end
  end

endmodule

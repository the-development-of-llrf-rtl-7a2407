// cordic_rot -- CORDIC in rotation mode: amplitude and phase to I/Q.
//
// The document uses CORDIC both to get amplitude and phase from I/Q "and vice
// versa"; this is the second direction, which turns the PI controllers'
// amplitude and phase back into the I/Q pair that drives the IQ modulator.
// It uses the same 12 iterations in three register stages as cordic_vec, so
// a result appears three clocks after its input and one input is accepted per
// clock.
//
// How it works: the amplitude is first multiplied by 1/K (K = 1.64676, the
// CORDIC gain) and placed on the x axis; if the phase lies outside
// +-90 degrees the start vector is negated and 180 degrees is taken off the
// angle.  Each iteration then turns the vector by +-atan(2^-i), driving the
// remaining angle towards zero.  The end point is I = A*cos(phi),
// Q = A*sin(phi), saturated to 16 bits.  The pre-scaling by 1/K and the two
// guard bits are this design's choices.
module cordic_rot
  import llrf_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t amp,
  input  angle_t  phase,
  output logic    out_valid,
  output iq_t     out
);

  localparam int W       = CORDIC_W;
  localparam int PER_STG = CORDIC_ITER / CORDIC_STAGES;

  typedef logic signed [W-1:0] cw_t;

  typedef struct packed {
    cw_t    x;
    cw_t    y;
    cangle_t z;
  } cstate_t;

  // Four rotation iterations starting at iteration `first`
  function automatic cstate_t iterate(input cstate_t s, input int first);
    cstate_t r = s;
    for (int k = 0; k < PER_STG; k++) begin
      int  i  = first + k;
      cw_t xs = r.x >>> i;
      cw_t ys = r.y >>> i;
      if (r.z >= 0) begin
        r.x = r.x - ys;
        r.y = r.y + xs;
        r.z = r.z - cordic_atan(i);
      end else begin
        r.x = r.x + ys;
        r.y = r.y - xs;
        r.z = r.z + cordic_atan(i);
      end
    end
    return r;
  endfunction

  cstate_t pre, s0_d, s1_d, s2_d;
  cstate_t st  [CORDIC_STAGES];
  logic    vld [CORDIC_STAGES];
  logic signed [W+17:0] a_scaled;
  cw_t     a0;

  // amp * 2^GUARD / K, rounded
  assign a_scaled = (W+18)'(amp) * (W+18)'(CORDIC_INV_K) + ((W+18)'(1) <<< (16 - CORDIC_GUARD - 1));
  assign a0       = cw_t'(a_scaled >>> (16 - CORDIC_GUARD));

  always_comb begin
    pre.y = '0;
    if (phase >= -ANGLE_90 && phase <= ANGLE_90) begin
      pre.x = a0;
      pre.z = cangle_t'(phase) <<< CORDIC_ZG;
    end else begin
      pre.x = -a0;
      pre.z = cangle_t'(angle_t'(phase - ANGLE_180)) <<< CORDIC_ZG;  // modulo 2*pi
    end
    s0_d = iterate(pre,   0);
    s1_d = iterate(st[0], PER_STG);
    s2_d = iterate(st[1], 2 * PER_STG);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < CORDIC_STAGES; s++) begin
        st[s]  <= '0;
        vld[s] <= 1'b0;
      end
    end else begin
      st[0]  <= s0_d;
      st[1]  <= s1_d;
      st[2]  <= s2_d;
      vld[0] <= in_valid;
      vld[1] <= vld[0];
      vld[2] <= vld[1];
    end
  end

  // Remove the guard bits with rounding
  assign out.i     = sat16(64'(cw_t'(st[2].x + cw_t'(1 <<< (CORDIC_GUARD - 1))) >>> CORDIC_GUARD));
  assign out.q     = sat16(64'(cw_t'(st[2].y + cw_t'(1 <<< (CORDIC_GUARD - 1))) >>> CORDIC_GUARD));
  assign out_valid = vld[2];

endmodule

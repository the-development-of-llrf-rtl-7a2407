// cordic_vec -- CORDIC in vectoring mode: I/Q to amplitude and phase.
//
// As in the document, the conversion uses 12 CORDIC iterations ("12-tap")
// and takes three clock periods: the iterations are split into three
// pipeline stages of four, each ending in a register, so a new I/Q pair can
// enter every clock and its result appears exactly three clocks later.
//
// How it works: the vector is first turned by -90 or +90 degrees if it lies in
// the left half-plane (that rotation is added to the angle accumulator), then
// each iteration i turns it towards the positive x axis by +-atan(2^-i) using
// only shifts and adds, accumulating the angle (with four fractional guard
// bits, rounded away at the output).  At the end y is about 0, the
// angle register holds the phase and x holds K times the amplitude
// (K = 1.64676).  x is then multiplied by the constant 1/K so the amplitude
// output is in the same units as I and Q; that constant multiplication, the
// two guard bits and the saturation of the amplitude at 32767 (it can reach
// sqrt(2)*32768) are this design's choices.
//
// Formats: I, Q, amplitude are 16-bit signed; the phase is a 16-bit angle with
// 2^15 = pi (see llrf_pkg).
module cordic_vec
  import llrf_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  iq_t     in,
  output logic    out_valid,
  output sample_t amp,
  output angle_t  phase
);

  localparam int W        = CORDIC_W;
  localparam int PER_STG  = CORDIC_ITER / CORDIC_STAGES;

  typedef logic signed [W-1:0] cw_t;

  typedef struct packed {
    cw_t    x;
    cw_t    y;
    cangle_t z;
  } cstate_t;

  // Four vectoring iterations starting at iteration `first`
  function automatic cstate_t iterate(input cstate_t s, input int first);
    cstate_t r = s;
    for (int k = 0; k < PER_STG; k++) begin
      int  i  = first + k;
      cw_t xs = r.x >>> i;
      cw_t ys = r.y >>> i;
      if (r.y >= 0) begin
        r.x = r.x + ys;
        r.y = r.y - xs;
        r.z = r.z + cordic_atan(i);
      end else begin
        r.x = r.x - ys;
        r.y = r.y + xs;
        r.z = r.z - cordic_atan(i);
      end
    end
    return r;
  endfunction

  cstate_t pre, s0_d, s1_d, s2_d;
  cstate_t st   [CORDIC_STAGES];
  logic    vld  [CORDIC_STAGES];
  cw_t     xin, yin;
  logic signed [W+17:0] scaled;

  assign xin = cw_t'(in.i) <<< CORDIC_GUARD;
  assign yin = cw_t'(in.q) <<< CORDIC_GUARD;

  // Pre-rotation into the right half-plane
  always_comb begin
    if (xin >= 0) begin
      pre.x = xin;  pre.y = yin;  pre.z = '0;
    end else if (yin >= 0) begin
      pre.x = yin;  pre.y = -xin; pre.z = cangle_t'(ANGLE_90) <<< CORDIC_ZG;   // turned by -90 degrees
    end else begin
      pre.x = -yin; pre.y = xin;  pre.z = -(cangle_t'(ANGLE_90) <<< CORDIC_ZG);  // turned by +90 degrees
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

  // Gain correction: amp = x / K, removing the guard bits, rounded
  assign scaled = (W+18)'(st[2].x) * (W+18)'(CORDIC_INV_K)
                + ((W+18)'(1) <<< (16 + CORDIC_GUARD - 1));

  assign amp       = sat16(64'(scaled >>> (16 + CORDIC_GUARD)));
  assign phase     = angle_t'((st[2].z + cangle_t'(1 <<< (CORDIC_ZG - 1))) >>> CORDIC_ZG);
  assign out_valid = vld[2];

endmodule

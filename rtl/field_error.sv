// field_error -- comparison of the cavity field with the reference.
//
// The amplitude and phase of the cavity channel are compared with those of
// the reference channel and the differences go to the two PI controllers
// (the two comparison nodes between the CORDICs and the PI block in the
// signal-processing diagram).  The document's console shows
// Amp_error = Amp_ref - Amp_cav and Phase_error = Phase_ref - Phase_cav, and
// says the processor sets "set phase, amplitude"; here the set-points are
// offsets added to the reference before the comparison (this design's
// reading), so with zero set-points the errors are exactly those on the
// console:
//   amp_err   = sat16(ref_amp + set_amp - cav_amp)
//   phase_err = ref_phase + set_phase - cav_phase   (modulo 2*pi)
// The phase error wraps like an angle, so it is always the shorter way round.
//
// Interface: the two channels run in lock-step, so their valid strobes come
// together; a pair of results is registered one clock after both are valid.
module field_error
  import llrf_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    ref_valid,
  input  polar_t  ref_pol,
  input  logic    cav_valid,
  input  polar_t  cav_pol,
  input  sample_t set_amp,
  input  angle_t  set_phase,
  output logic    err_valid,
  output sample_t amp_err,
  output angle_t  phase_err
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_valid <= 1'b0;
      amp_err   <= '0;
      phase_err <= '0;
    end else begin
      err_valid <= ref_valid && cav_valid;
      if (ref_valid && cav_valid) begin
        amp_err   <= sat16(64'(ref_pol.amp) + 64'(set_amp) - 64'(cav_pol.amp));
        phase_err <= ref_pol.phase + set_phase - cav_pol.phase;
      end
    end
  end

  // The reference and cavity chains are identical pipelines fed in parallel
  a_channels_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                                       ref_valid == cav_valid)
    else $error("reference and cavity samples out of step");

endmodule

// llrf_top -- digital low-level RF controller: the FPGA logic between the
// ADCs, the DAC and the processor.
//
// Signal path (ADC clock, 40 MHz), one chain each for the reference and the
// cavity-field pick-up (a third, identical chain measures the forward power
// for monitoring only):
//   ADC samples of the 50 MHz IF -> iq_demod (I/Q pairs at 20 MS/s)
//   -> cic_filter (3-tap) -> cordic_vec (amplitude, phase; 3 clocks)
// then
//   field_error (reference + set-point - cavity)
//   -> pi_ctrl for the amplitude and pi_ctrl for the phase (wrapping)
//   -> cordic_rot (back to I/Q; 3 clocks)
//   -> iq_mod (crossing into the 230 MHz DAC clock, 50 MHz IF synthesis)
//   -> DAC samples.
// Processor side: block_memory holds four 1024 x 32 memories shared with the
// processor bus (`host_*`); llrf_mem_if reads the set-points and gains from
// memory 0 and writes the monitoring values of the chains and of the
// controller into memories 1-3 (forward power: words 8..13 of memory 0),
// every 14 ADC clocks.
//
// The chain and the blocks follow the document's signal-processing diagram
// and text.  The document lists forward power among the monitored signals
// and has four RF receivers, but does not show its path; the forward chain
// and its memory words are this design's reading.  The processor itself (with its UARTs, timer, interrupt
// controller and GPIO) is not part of this logic: its memory bus is brought
// out as the host port.  Loop latency from an ADC sample to the DAC I/Q
// update: about 11 ADC clocks plus 3-4 DAC clocks.
//
// Clocks: clk_adc (40 MHz) for the signal path and the LLRF memory ports,
// clk_dac (230 MHz, locked to clk_adc) for the modulator output, clk_host for
// the processor bus.  rst_n is an asynchronous, active-low reset for all.
// The status outputs (refresh strobe, amplitude saturation, controller
// update strobe) are this design's addition for observing the loop; the
// phase controller wraps instead of clipping, so it has no saturation flag,
// and the modulator's table index is not needed outside.
module llrf_top
  import llrf_pkg::*;
(
  input  logic        clk_adc,
  input  logic        clk_dac,
  input  logic        clk_host,
  input  logic        rst_n,
  // converters
  input  sample_t     adc_ref,     // reference IF samples
  input  sample_t     adc_cav,     // cavity-field IF samples
  input  sample_t     adc_fwd,     // forward-power IF samples (monitoring only)
  output sample_t     dac_out,     // modulated IF samples to the DAC
  // processor memory bus: addr[11:10] selects the memory, addr[9:0] the word
  input  logic        host_en,
  input  logic        host_we,
  input  logic [11:0] host_addr,
  input  mem_word_t   host_wdata,
  output mem_word_t   host_rdata,
  // status
  output logic        ctrl_refresh,   // set-points and gains reloaded (one clk_adc)
  output logic        amp_saturated,  // amplitude controller output clipped
  output logic        pi_update       // controllers produced a new output (one clk_adc)
);

  // ---------------- receive chains ----------------
  iq_t    ref_raw, cav_raw, fwd_raw, ref_filt, cav_filt, fwd_filt;
  logic   ref_raw_v, cav_raw_v, fwd_raw_v, ref_filt_v, cav_filt_v, fwd_filt_v;
  polar_t ref_pol, cav_pol, fwd_pol;
  logic   ref_pol_v, cav_pol_v;

  iq_demod   u_demod_ref (.clk(clk_adc), .rst_n, .adc(adc_ref), .iq(ref_raw), .iq_valid(ref_raw_v));
  iq_demod   u_demod_cav (.clk(clk_adc), .rst_n, .adc(adc_cav), .iq(cav_raw), .iq_valid(cav_raw_v));
  iq_demod   u_demod_fwd (.clk(clk_adc), .rst_n, .adc(adc_fwd), .iq(fwd_raw), .iq_valid(fwd_raw_v));

  cic_filter u_cic_ref (.clk(clk_adc), .rst_n, .in_valid(ref_raw_v), .in(ref_raw),
                        .out_valid(ref_filt_v), .out(ref_filt));
  cic_filter u_cic_cav (.clk(clk_adc), .rst_n, .in_valid(cav_raw_v), .in(cav_raw),
                        .out_valid(cav_filt_v), .out(cav_filt));
  cic_filter u_cic_fwd (.clk(clk_adc), .rst_n, .in_valid(fwd_raw_v), .in(fwd_raw),
                        .out_valid(fwd_filt_v), .out(fwd_filt));

  cordic_vec u_cordic_ref (.clk(clk_adc), .rst_n, .in_valid(ref_filt_v), .in(ref_filt),
                           .out_valid(ref_pol_v), .amp(ref_pol.amp), .phase(ref_pol.phase));
  cordic_vec u_cordic_cav (.clk(clk_adc), .rst_n, .in_valid(cav_filt_v), .in(cav_filt),
                           .out_valid(cav_pol_v), .amp(cav_pol.amp), .phase(cav_pol.phase));
  cordic_vec u_cordic_fwd (.clk(clk_adc), .rst_n, .in_valid(fwd_filt_v), .in(fwd_filt),
                           .out_valid(), .amp(fwd_pol.amp), .phase(fwd_pol.phase));

  // ---------------- comparison and control ----------------
  ctrl_t   ctrl;
  logic    err_v, amp_pi_v, phase_pi_v;
  sample_t amp_err, amp_pi;
  angle_t  phase_err, phase_pi;

  field_error u_error (.clk(clk_adc), .rst_n,
                       .ref_valid(ref_pol_v), .ref_pol,
                       .cav_valid(cav_pol_v), .cav_pol,
                       .set_amp(ctrl.set_amp), .set_phase(ctrl.set_phase),
                       .err_valid(err_v), .amp_err, .phase_err);

  pi_ctrl #(.WRAP(1'b0)) u_pi_amp (.clk(clk_adc), .rst_n, .err_valid(err_v), .err(amp_err),
                                   .kp(ctrl.kp_amp), .ki(ctrl.ki_amp),
                                   .u_valid(amp_pi_v), .u(amp_pi), .saturated(amp_saturated));
  pi_ctrl #(.WRAP(1'b1)) u_pi_phase (.clk(clk_adc), .rst_n, .err_valid(err_v), .err(phase_err),
                                     .kp(ctrl.kp_phase), .ki(ctrl.ki_phase),
                                     .u_valid(phase_pi_v), .u(phase_pi), .saturated());

  // ---------------- transmit path ----------------
  iq_t  fdb;
  logic fdb_v;

  cordic_rot u_cordic_out (.clk(clk_adc), .rst_n, .in_valid(amp_pi_v),
                           .amp(amp_pi), .phase(phase_pi), .out_valid(fdb_v), .out(fdb));

  iq_mod u_iq_mod (.rst_n, .clk_src(clk_adc), .iq_valid(fdb_v), .iq(fdb),
                   .clk_dac, .dac(dac_out), .lut_idx());

  // ---------------- processor exchange ----------------
  mon_t      mon;
  mem_req_t  llrf_req   [NUM_MEM_BLOCKS];
  mem_word_t llrf_rdata [NUM_MEM_BLOCKS];

  always_comb begin
    mon.ref_raw   = ref_raw;
    mon.ref_filt  = ref_filt;
    mon.ref_pol   = ref_pol;
    mon.cav_raw   = cav_raw;
    mon.cav_filt  = cav_filt;
    mon.cav_pol   = cav_pol;
    mon.fwd_raw   = fwd_raw;
    mon.fwd_filt  = fwd_filt;
    mon.fwd_pol   = fwd_pol;
    mon.amp_err   = amp_err;
    mon.phase_err = phase_err;
    mon.amp_pi    = amp_pi;
    mon.phase_pi  = phase_pi;
    mon.fdb       = fdb;
  end

  llrf_mem_if u_mem_if (.clk(clk_adc), .rst_n, .mon, .ctrl, .ctrl_update(ctrl_refresh),
                        .req(llrf_req), .rdata(llrf_rdata));

  block_memory u_block_memory (.clk_host, .host_en, .host_we, .host_addr, .host_wdata,
                               .host_rdata, .clk_llrf(clk_adc), .llrf_req, .llrf_rdata);

  assign pi_update = amp_pi_v;

  // the two PI controllers update together
  a_pi_in_step: assert property (@(posedge clk_adc) disable iff (!rst_n) amp_pi_v == phase_pi_v)
    else $error("amplitude and phase controllers out of step");

endmodule

// tb_llrf_top -- end-to-end closed-loop test of the LLRF controller.
//
// The testbench closes the RF loop around the design at default parameters:
//   * the DAC output (230 MHz) is demodulated over a sliding window of 23
//     samples (five IF periods) to recover the drive I/Q;
//   * a first-order "cavity" (gain 0.8, phase shift +60 degrees, time
//     constant 8 ADC clocks) turns the drive into the cavity field;
//   * the cavity field and a fixed reference (18000 at 170 degrees) are
//     turned back into 50 MHz IF samples at 40 MHz, with +-30 LSB of noise,
//     for the two ADC inputs; the drive itself, through a coupler of gain
//     0.5, feeds the forward-power input.
// Through the host port it writes gains and set-points into the control
// memory and reads the monitoring memories.  It checks that
//   1. the loop locks the cavity to the reference (amplitude within 0.5 %,
//      phase within 0.3 degrees, measured by the testbench's own model) and
//      holds it, with the ADC noise, within the +-0.75 % and 0.35 degree
//      stability requirement for 4000 ADC clocks;
//   2. a set-point change (+3000 amplitude, +2000 phase, taking the cavity
//      through 180 degrees) is followed;
//   3. an unreachable amplitude set-point saturates the amplitude controller,
//      and the loop recovers when the set-point is restored;
//   4. the monitoring words read by the host agree with the real reference
//      and cavity fields and the forward power, and the forward-power words
//      leave the host's gain words in the same memory untouched.
// Mechanisms counted (each must occur): control refreshes, I/Q transfers into
// the DAC clock domain, phase-error wrap-around, left-half-plane inputs to
// the vectoring CORDIC, drive phases beyond +-90 degrees in the rotation
// CORDIC, and controller saturation.
`timescale 1ns/1ps
module tb_llrf_top;
  import llrf_pkg::*;

  localparam real PI = 3.14159265358979;

  logic        clk_adc = 0, clk_dac = 0, clk_host = 0, rst_n = 0;
  sample_t     adc_ref = '0, adc_cav = '0, adc_fwd = '0, dac_out;
  logic        host_en = 0, host_we = 0;
  logic [11:0] host_addr = '0;
  mem_word_t   host_wdata = '0, host_rdata;
  int          checks = 0, failures = 0;

  logic        ctrl_refresh, amp_saturated, pi_update;

  llrf_top dut (.clk_adc, .clk_dac, .clk_host, .rst_n, .adc_ref, .adc_cav, .adc_fwd, .dac_out,
                .host_en, .host_we, .host_addr, .host_wdata, .host_rdata,
                .ctrl_refresh, .amp_saturated, .pi_update);

  // 40 MHz ADC clock and 230 MHz DAC clock locked to it (23 : 4)
  always #12.5 clk_adc = ~clk_adc;
  initial begin
    realtime t0;
    t0 = $realtime;
    for (longint k = 1; ; k++) begin
      #((t0 + k * 50.0 / 23.0) - $realtime);
      clk_dac = ~clk_dac;
    end
  end
  always #5 clk_host = ~clk_host;

  initial begin : watchdog
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- DAC demodulation ----------------
  real    win [23];
  longint dac_cnt = 0;
  real    drive_i = 0.0, drive_q = 0.0;

  initial for (int k = 0; k < 23; k++) win[k] = 0.0;

  always @(posedge clk_dac) begin
    if (rst_n) begin
      real si, sq, w;
      #0.1;
      win[dac_cnt % 23] = real'(dac_out);
      si = 0.0; sq = 0.0;
      for (int k = 0; k < 23; k++) begin
        w  = 2.0 * PI * 5.0 * k / 23.0;
        si += win[k] * $cos(w);
        sq += win[k] * $sin(w);
      end
      drive_i = 2.0 / 23.0 * si;
      drive_q = -2.0 / 23.0 * sq;
      dac_cnt++;
    end
  end

  // ---------------- cavity model and ADC samples ----------------
  localparam real GAIN   = 0.8;
  localparam real SHIFT  = 60.0 / 180.0 * PI;
  localparam real ALPHA  = 1.0 / 8.0;
  localparam real REF_A  = 18000.0;
  localparam real REF_PH = 170.0 / 180.0 * PI;
  localparam real FWD_K  = 0.5;

  real    cav_i = 0.0, cav_q = 0.0;
  longint n_adc = 0;

  function automatic sample_t if_sample(real i, real q, longint n);
    real w, v;
    w = 2.0 * PI * 50.0 / 40.0 * real'(n % 4);
    v = i * $cos(w) - q * $sin(w) + real'($urandom_range(0, 60)) - 30.0;
    if (v > 32767.0) v = 32767.0;
    if (v < -32768.0) v = -32768.0;
    return sample_t'($rtoi(v));
  endfunction

  always @(posedge clk_adc) begin
    real ti, tq;
    ti = GAIN * (drive_i * $cos(SHIFT) - drive_q * $sin(SHIFT));
    tq = GAIN * (drive_i * $sin(SHIFT) + drive_q * $cos(SHIFT));
    cav_i += ALPHA * (ti - cav_i);
    cav_q += ALPHA * (tq - cav_q);
  end

  always @(negedge clk_adc) begin
    if (rst_n) begin
      adc_ref <= if_sample(REF_A * $cos(REF_PH), REF_A * $sin(REF_PH), n_adc);
      adc_cav <= if_sample(cav_i, cav_q, n_adc);
      adc_fwd <= if_sample(FWD_K * drive_i, FWD_K * drive_q, n_adc);
      n_adc++;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_refresh = 0, n_transfer = 0, n_phase_wrap = 0, n_vec_left = 0;
  int n_rot_back = 0, n_amp_sat = 0;

  // counted from outside the design: the phase error wraps when the
  // reference + set-point - cavity phase leaves +-180 degrees; the vectoring
  // CORDIC sees a left-half-plane input when a field's I is negative; the
  // rotation CORDIC works beyond +-90 degrees when the drive's I is negative;
  // a new I/Q pair reached the DAC domain when a DAC sample differs from the
  // one 23 samples (one table period) earlier by more than rounding.
  real set_phase_deg = 0.0;
  real dac_hist [23];
  always @(posedge clk_adc) begin
    if (rst_n) begin
      real cp, raw;
      if (ctrl_refresh) n_refresh++;
      if (pi_update) begin
        cp  = $atan2(cav_q, cav_i) / PI * 180.0;
        raw = 170.0 + set_phase_deg - cp;
        if ((cav_i * cav_i + cav_q * cav_q) > 1.0e6 && (raw > 180.0 || raw < -180.0))
          n_phase_wrap++;
        if (REF_A * $cos(REF_PH) < 0.0 || cav_i < 0.0) n_vec_left++;
        if (drive_i < -100.0) n_rot_back++;
        if (amp_saturated) n_amp_sat++;
      end
    end
  end
  always @(posedge clk_dac) begin
    if (rst_n) begin
      #0.2;
      if (dac_cnt > 23 && (real'(dac_out) - dac_hist[dac_cnt % 23] > 2.0 ||
                           dac_hist[dac_cnt % 23] - real'(dac_out) > 2.0))
        n_transfer++;
      dac_hist[dac_cnt % 23] = real'(dac_out);
    end
  end

  // ---------------- host bus ----------------
  task automatic host_write(input int blk, input int w, input int d);
    @(negedge clk_host);
    host_en = 1; host_we = 1; host_addr = {2'(blk), 10'(w)}; host_wdata = mem_word_t'(d);
    @(negedge clk_host);
    host_en = 0; host_we = 0;
  endtask

  task automatic host_read(input int blk, input int w, output int d);
    @(negedge clk_host);
    host_en = 1; host_we = 0; host_addr = {2'(blk), 10'(w)};
    @(posedge clk_host); #1;
    host_en = 0;
    d = int'(host_rdata);
  endtask

  task automatic wait_adc(input int n);
    repeat (n) @(posedge clk_adc);
  endtask

  function automatic real wrap_deg(input real d);
    while (d > 180.0) d -= 360.0;
    while (d < -180.0) d += 360.0;
    return d;
  endfunction

  // cavity amplitude/phase from the model
  task automatic check_lock(input string what, input real amp_exp, input real ph_exp_deg);
    real a, p, da, dp;
    a  = $sqrt(cav_i * cav_i + cav_q * cav_q);
    p  = $atan2(cav_q, cav_i) / PI * 180.0;
    da = a - amp_exp;
    dp = wrap_deg(p - ph_exp_deg);
    $display("%s: cavity %f at %f deg (target %f at %f deg)", what, a, p, amp_exp, ph_exp_deg);
    checks++;
    if (da > 0.005 * amp_exp || da < -0.005 * amp_exp) begin
      failures++; $display("%s: amplitude off by %f", what, da);
    end
    checks++;
    if (dp > 0.3 || dp < -0.3) begin
      failures++; $display("%s: phase off by %f deg", what, dp);
    end
  endtask

  initial begin
    int d, a_ref_mon, a_cav_mon, p_ref_mon, p_cav_mon;
    real set_ph_deg;
    repeat (3) @(posedge clk_adc);
    #1 rst_n = 1;
    // gains: Kp = 0.25, Ki = 1/32 (8 fractional bits)
    host_write(MEM_CTRL, 2, 'h0040);
    host_write(MEM_CTRL, 3, 'h0008);
    host_write(MEM_CTRL, 4, 'h0040);
    host_write(MEM_CTRL, 5, 'h0008);
    wait_adc(4000);
    check_lock("lock", REF_A, 170.0);

    // field stability while locked, against +-0.75 % and 0.35 degrees
    begin
      real a, ph, amin, amax, pmin, pmax;
      amin = 1.0e9; amax = -1.0e9; pmin = 1.0e9; pmax = -1.0e9;
      for (int k = 0; k < 4000; k++) begin
        @(posedge clk_adc);
        a  = $sqrt(cav_i * cav_i + cav_q * cav_q);
        ph = wrap_deg($atan2(cav_q, cav_i) / PI * 180.0 - 170.0);
        if (a < amin) amin = a;
        if (a > amax) amax = a;
        if (ph < pmin) pmin = ph;
        if (ph > pmax) pmax = ph;
      end
      $display("stability: amplitude %f .. %f (%f %%), phase %f .. %f deg",
               amin, amax, 100.0 * (amax - REF_A) / REF_A, pmin, pmax);
      checks++;
      if (amax > REF_A * 1.0075 || amin < REF_A * 0.9925) begin
        failures++; $display("amplitude outside +-0.75 %%");
      end
      checks++;
      if (pmax > 0.35 || pmin < -0.35) begin
        failures++; $display("phase outside +-0.35 degrees");
      end
    end

    // 4. monitoring readback
    host_read(MEM_MON_REF, 4, a_ref_mon);
    host_read(MEM_MON_REF, 5, p_ref_mon);
    host_read(MEM_MON_CAV, 4, a_cav_mon);
    host_read(MEM_MON_CAV, 5, p_cav_mon);
    $display("monitor: Amp_ref %0d Phase_ref %0d Amp_cav %0d Phase_cav %0d",
             a_ref_mon, p_ref_mon, a_cav_mon, p_cav_mon);
    checks++;
    if (a_ref_mon < 17900 || a_ref_mon > 18100) begin
      failures++; $display("monitored reference amplitude wrong");
    end
    checks++;
    if (wrap_deg(real'(p_ref_mon) / 32768.0 * 180.0 - 170.0) > 0.5 ||
        wrap_deg(real'(p_ref_mon) / 32768.0 * 180.0 - 170.0) < -0.5) begin
      failures++; $display("monitored reference phase wrong");
    end
    checks++;
    if (a_cav_mon - $rtoi($sqrt(cav_i * cav_i + cav_q * cav_q)) > 150 ||
        a_cav_mon - $rtoi($sqrt(cav_i * cav_i + cav_q * cav_q)) < -150) begin
      failures++; $display("monitored cavity amplitude wrong");
    end
    host_read(MEM_MON_CTL, 0, d);
    checks++;
    if (d > 200 || d < -200) begin failures++; $display("monitored amplitude error %0d", d); end
    // forward power: amplitude and phase of the drive seen through the coupler
    begin
      int  a_fwd_mon, p_fwd_mon, kp_mon;
      real a_fwd, p_fwd;
      host_read(MEM_CTRL, MON_FWD_BASE + 4, a_fwd_mon);
      host_read(MEM_CTRL, MON_FWD_BASE + 5, p_fwd_mon);
      host_read(MEM_CTRL, 2, kp_mon);
      a_fwd = FWD_K * $sqrt(drive_i * drive_i + drive_q * drive_q);
      p_fwd = $atan2(drive_q, drive_i) / PI * 180.0;
      $display("monitor: Amp_fwd %0d Phase_fwd %0d (drive %f at %f deg through the coupler)",
               a_fwd_mon, p_fwd_mon, a_fwd, p_fwd);
      checks++;
      if (real'(a_fwd_mon) - a_fwd > 150.0 || real'(a_fwd_mon) - a_fwd < -150.0) begin
        failures++; $display("monitored forward amplitude wrong");
      end
      checks++;
      if (wrap_deg(real'(p_fwd_mon) / 32768.0 * 180.0 - p_fwd) > 1.0 ||
          wrap_deg(real'(p_fwd_mon) / 32768.0 * 180.0 - p_fwd) < -1.0) begin
        failures++; $display("monitored forward phase wrong");
      end
      checks++;
      if (kp_mon != 'h0040) begin failures++; $display("gain word overwritten: %h", kp_mon); end
    end

    // 2. set-point change through 180 degrees
    host_write(MEM_CTRL, 0, 3000);
    host_write(MEM_CTRL, 1, 2000);
    set_ph_deg = 2000.0 / 32768.0 * 180.0;
    set_phase_deg = set_ph_deg;
    wait_adc(4000);
    check_lock("set-point step", REF_A + 3000.0, 170.0 + set_ph_deg);

    // 3. unreachable amplitude: the controller saturates, then recovers
    host_write(MEM_CTRL, 0, 20000);
    wait_adc(3000);
    checks++;
    if (!amp_saturated) begin failures++; $display("amplitude controller not saturated"); end
    host_write(MEM_CTRL, 0, 0);
    host_write(MEM_CTRL, 1, 0);
    set_phase_deg = 0.0;
    wait_adc(4000);
    check_lock("recovery", REF_A, 170.0);

    $display("mechanisms: refreshes %0d, DAC-domain transfers %0d, phase wraps %0d, left-half vectoring %0d, back-half rotation %0d, saturated updates %0d",
             n_refresh, n_transfer, n_phase_wrap, n_vec_left, n_rot_back, n_amp_sat);
    checks++; if (n_refresh == 0)    begin failures++; $display("no control refresh"); end
    checks++; if (n_transfer == 0)   begin failures++; $display("no DAC-domain transfer"); end
    checks++; if (n_phase_wrap == 0) begin failures++; $display("no phase wrap"); end
    checks++; if (n_vec_left == 0)   begin failures++; $display("no left-half vectoring"); end
    checks++; if (n_rot_back == 0)   begin failures++; $display("no back-half rotation"); end
    checks++; if (n_amp_sat == 0)    begin failures++; $display("no saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

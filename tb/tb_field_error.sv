// tb_field_error -- self-checking test of the reference/cavity comparison.
//
// Random reference and cavity amplitudes and phases and random set-point
// offsets; the amplitude error must equal ref + set - cav clipped to 16 bits,
// and the phase error the same sum taken modulo a full turn.  Includes the
// console example (Amp_ref 451A, Amp_cav 4464 -> error 00B6) and cases that
// clip and that wrap through 180 degrees.  One clock of latency is checked.
module tb_field_error;
  import llrf_pkg::*;

  logic    clk = 0, rst_n = 0;
  logic    ref_valid = 0, cav_valid = 0, err_valid;
  polar_t  ref_pol = '0, cav_pol = '0;
  sample_t set_amp = '0, amp_err;
  angle_t  set_phase = '0, phase_err;
  int      checks = 0, failures = 0;
  int      clips = 0, wraps = 0;

  field_error dut (.clk, .rst_n, .ref_valid, .ref_pol, .cav_valid, .cav_pol,
                   .set_amp, .set_phase, .err_valid, .amp_err, .phase_err);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int ra, input int rp, input int ca, input int cp,
                     input int sa, input int sp);
    int ea, ep;
    @(negedge clk);
    ref_valid = 1; cav_valid = 1;
    ref_pol.amp = sample_t'(ra); ref_pol.phase = angle_t'(rp);
    cav_pol.amp = sample_t'(ca); cav_pol.phase = angle_t'(cp);
    set_amp = sample_t'(sa); set_phase = angle_t'(sp);
    ea = int'(sample_t'(ra)) + int'(sample_t'(sa)) - int'(sample_t'(ca));
    if (ea > 32767) begin ea = 32767; clips++; end
    if (ea < -32768) begin ea = -32768; clips++; end
    ep = int'(angle_t'(rp)) + int'(angle_t'(sp)) - int'(angle_t'(cp));
    if (ep > 32767 || ep < -32768) wraps++;
    ep = ((ep % 65536) + 65536 + 32768) % 65536 - 32768;
    @(posedge clk); #1;
    ref_valid = 0; cav_valid = 0;
    checks++;
    if (!err_valid || int'(amp_err) != ea || int'(phase_err) != ep) begin
      failures++;
      $display("valid %b amp_err %0d (exp %0d) phase_err %0d (exp %0d)",
               err_valid, amp_err, ea, phase_err, ep);
    end
    @(posedge clk); #1;
    checks++;
    if (err_valid) begin failures++; $display("valid without input"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    one('h451A, 'hF839 - 65536, 'h4464, 'hF777 - 65536, 0, 0);
    checks++;
    if (amp_err != 16'sh00B6 || phase_err != 16'sh00C2) begin
      failures++; $display("console example wrong");
    end
    one(32000, 30000, -32000, -30000, 1000, 5000);
    for (int r = 0; r < 5000; r++)
      one($urandom_range(0, 65535) - 32768, $urandom_range(0, 65535) - 32768,
          $urandom_range(0, 65535) - 32768, $urandom_range(0, 65535) - 32768,
          $urandom_range(0, 4000) - 2000, $urandom_range(0, 65535) - 32768);
    checks++;
    if (clips == 0 || wraps == 0) begin
      failures++; $display("clip or wrap never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

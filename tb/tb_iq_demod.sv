// tb_iq_demod -- self-checking test of the IQ-sampling demodulator.
//
// Builds a 50 MHz IF sampled at 40 MHz from known I/Q values with real
// arithmetic, x[n] = I*cos(2*pi*50/40*n) - Q*sin(2*pi*50/40*n), feeds it to
// the demodulator and checks that every output pair equals the I/Q that
// generated it, that a pair comes every second clock and never in between,
// and that a full-scale negative sample is negated with saturation.
module tb_iq_demod;
  import llrf_pkg::*;

  logic    clk = 0, rst_n = 0;
  sample_t adc = '0;
  iq_t     iq;
  logic    iq_valid;
  int      checks = 0, failures = 0;
  logic    done = 0;   // stimulus finished: the demodulator keeps running

  iq_demod dut (.clk, .rst_n, .adc, .iq, .iq_valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected pairs, in order of the sample that completes them
  iq_t exp_q[$];
  int  clk_since_valid = 0;

  function automatic sample_t if_sample(int i, int q, int n);
    real w = 2.0 * 3.14159265358979 * 50.0 / 40.0 * n;
    real v = i * $cos(w) - q * $sin(w);
    v = (v > 32767.0) ? 32767.0 : v;
    return sample_t'($rtoi(v + ((v >= 0) ? 0.5 : -0.5)));
  endfunction

  // check outputs
  always @(posedge clk) begin
    if (rst_n && !done) begin
      #1;
      if (iq_valid) begin
        iq_t e;
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("unexpected pair");
        end else begin
          e = exp_q.pop_front();
          if (iq !== e) begin
            failures++;
            $display("pair mismatch: got %0d,%0d exp %0d,%0d", iq.i, iq.q, e.i, e.q);
          end
        end
        checks++;
        if (clk_since_valid != 2 && clk_since_valid != 0) begin
          failures++; $display("pair spacing %0d clocks", clk_since_valid);
        end
        clk_since_valid = 1;
      end else if (clk_since_valid != 0) begin
        clk_since_valid++;
      end
    end
  end

  initial begin
    int n = 0;
    int ii, qq;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // 400 pairs of random I/Q, each held for one full pattern of 4 samples
    for (int p = 0; p < 200; p++) begin
      ii = $urandom_range(0, 46000) - 23000;
      qq = $urandom_range(0, 46000) - 23000;
      if (p == 50) begin ii = -32768; qq = 32767; end
      for (int k = 0; k < 4; k++) begin
        adc = if_sample(ii, qq, n);
        if (p == 50 && k == 2) adc = -16'sd32768;  // -I with I=-32768 is +32768: clip
        n++;
        if (k == 1 || k == 3) begin
          iq_t e;
          e.i = (p == 50) ? ((k == 1) ? -16'sd32768 : 16'sd32767) : sample_t'(ii);
          e.q = sample_t'(qq);
          exp_q.push_back(e);
        end
        @(negedge clk);
      end
    end
    repeat (1) @(negedge clk);
    done = 1;
    checks++;
    if (exp_q.size() != 0) begin
      failures++; $display("%0d pairs never came out", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

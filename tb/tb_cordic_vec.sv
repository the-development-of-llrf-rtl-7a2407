// tb_cordic_vec -- self-checking test of the vectoring CORDIC (I/Q to
// amplitude and phase).
//
// Streams one random I/Q pair per clock, covering all four quadrants, the
// axes and full-scale values, and compares each result, three clocks later,
// with sqrt(I^2+Q^2) and atan2(Q, I) computed in real arithmetic.  The
// amplitude must agree within 4 LSB and the phase within 12 LSB (0.066
// degrees), both inside the 0.0895 % error the reference design reports; the
// worst errors are printed.  The three-clock
// latency and full throughput are checked on every sample.
module tb_cordic_vec;
  import llrf_pkg::*;

  localparam real PI = 3.14159265358979;

  logic    clk = 0, rst_n = 0;
  logic    in_valid = 0, out_valid;
  iq_t     in = '0;
  sample_t amp;
  angle_t  phase;
  int      checks = 0, failures = 0;

  cordic_vec dut (.clk, .rst_n, .in_valid, .in, .out_valid, .amp, .phase);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results indexed by input cycle
  real exp_amp [$];
  real exp_ph  [$];
  int  in_cycle [$];
  int  cycle = 0;
  real worst_a = 0.0, worst_p = 0.0;
  int  quadrant_hits [4] = '{0, 0, 0, 0};

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      if (out_valid) begin
        real ea, ep, da, dp;
        int  c0;
        checks++;
        if (in_cycle.size() == 0) begin
          failures++; $display("result without input");
        end else begin
          c0 = in_cycle.pop_front();
          ea = exp_amp.pop_front();
          ep = exp_ph.pop_front();
          if (cycle - c0 != 3) begin
            failures++; $display("latency %0d clocks", cycle - c0);
          end
          checks++;
          da = real'(amp) - (ea > 32767.0 ? 32767.0 : ea);
          dp = real'(phase) - ep;
          if (dp > 32768.0)  dp -= 65536.0;
          if (dp < -32768.0) dp += 65536.0;
          if (da < 0) da = -da;
          if (dp < 0) dp = -dp;
          if (ea > 1000.0 && dp > worst_p) worst_p = dp;
          if (da > worst_a) worst_a = da;
          if (da > 4.0 || (ea > 1000.0 && dp > 12.0)) begin
            failures++;
            $display("amp %0d (exp %f) phase %0d (exp %f)", amp, ea, phase, ep);
          end
        end
      end
    end
  end

  task automatic send(input int ii, input int qq);
    real a;
    @(negedge clk);
    in_valid = 1; in.i = sample_t'(ii); in.q = sample_t'(qq);
    a = $atan2(real'(qq), real'(ii)) / PI * 32768.0;
    exp_amp.push_back($sqrt(real'(ii) * real'(ii) + real'(qq) * real'(qq)));
    exp_ph.push_back(a);
    in_cycle.push_back(cycle);
    quadrant_hits[(ii >= 0 ? 0 : 1) + (qq >= 0 ? 0 : 2)]++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    send(20000, 0);     send(0, 20000);   send(-20000, 0);  send(0, -20000);
    send(-20000, 1);    send(-20000, -1); send(32767, 32767); send(-32768, -32768);
    send(17455, -3556); send(17213, -3842);
    for (int r = 0; r < 20000; r++)
      send($urandom_range(0, 65535) - 32768, $urandom_range(0, 65535) - 32768);
    @(negedge clk) in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (in_cycle.size() != 0) begin failures++; $display("missing results"); end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (quadrant_hits[k] == 0) begin failures++; $display("quadrant %0d unused", k); end
    end
    $display("worst amplitude error %f LSB (%f %% of full scale), worst phase error %f LSB (%f deg)",
             worst_a, worst_a / 327.68, worst_p, worst_p / 32768.0 * 180.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

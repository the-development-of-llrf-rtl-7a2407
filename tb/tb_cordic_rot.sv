// tb_cordic_rot -- self-checking test of the rotation CORDIC (amplitude and
// phase to I/Q).
//
// Streams one random amplitude/phase pair per clock over the whole circle,
// including both sides of +-90 degrees and 180 degrees, and compares the I/Q
// three clocks later with A*cos(phi), A*sin(phi) computed in real arithmetic
// (within 20 LSB, 0.06 % of full scale: twelve iterations leave up to about
// 5 angle LSB, i.e. 0.03 degrees, of residual rotation).  Latency and throughput are checked on every sample.
module tb_cordic_rot;
  import llrf_pkg::*;

  localparam real PI = 3.14159265358979;

  logic    clk = 0, rst_n = 0;
  logic    in_valid = 0, out_valid;
  sample_t amp = '0;
  angle_t  phase = '0;
  iq_t     out;
  int      checks = 0, failures = 0;

  cordic_rot dut (.clk, .rst_n, .in_valid, .amp, .phase, .out_valid, .out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real exp_i [$];
  real exp_q [$];
  int  in_cycle [$];
  int  cycle = 0;
  real worst = 0.0;
  int  back_half = 0;   // phases beyond +-90 degrees (start vector negated)

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      if (out_valid) begin
        real ei, eq, di, dq;
        int  c0;
        checks++;
        if (in_cycle.size() == 0) begin
          failures++; $display("result without input");
        end else begin
          c0 = in_cycle.pop_front();
          ei = exp_i.pop_front();
          eq = exp_q.pop_front();
          if (cycle - c0 != 3) begin
            failures++; $display("latency %0d clocks", cycle - c0);
          end
          checks++;
          di = real'(out.i) - ei; if (di < 0) di = -di;
          dq = real'(out.q) - eq; if (dq < 0) dq = -dq;
          if (di > worst) worst = di;
          if (dq > worst) worst = dq;
          if (di > 20.0 || dq > 20.0) begin
            failures++;
            $display("got %0d,%0d expected %f,%f", int'(out.i), int'(out.q), ei, eq);
          end
        end
      end
    end
  end

  task automatic send(input int a, input int p);
    real ph;
    @(negedge clk);
    in_valid = 1; amp = sample_t'(a); phase = angle_t'(p);
    ph = real'(angle_t'(p)) / 32768.0 * PI;
    exp_i.push_back(real'(a) * $cos(ph));
    exp_q.push_back(real'(a) * $sin(ph));
    in_cycle.push_back(cycle);
    if (angle_t'(p) > ANGLE_90 || angle_t'(p) < -ANGLE_90) back_half++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    send(20000, 0); send(20000, 16384); send(20000, -16384); send(20000, -32768);
    send(20000, 16385); send(20000, -16385); send(32767, 8192); send(0, 1000);
    send(17421, 31051);
    for (int r = 0; r < 20000; r++)
      send($urandom_range(0, 32767), $urandom_range(0, 65535) - 32768);
    @(negedge clk) in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (in_cycle.size() != 0) begin failures++; $display("missing results"); end
    checks++;
    if (back_half == 0) begin failures++; $display("no phase beyond 90 degrees"); end
    $display("worst I/Q error %f LSB", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

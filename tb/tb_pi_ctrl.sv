// tb_pi_ctrl -- self-checking test of the PI controller.
//
// Part 1 drives random errors and gains and compares every output with a
// 64-bit software model of  integ += ki*err (clamped to the output range),
// u = sat((kp*err + integ) / 2^8), including runs long enough to clip.
// A second instance with WRAP = 1 is checked against the same model with
// the integrator and output taken modulo 2^24 and 2^16 instead of clamped.
// Part 2 closes a loop around a simple plant (y = u / 2, error = r - y) and
// checks that the integral action drives the steady-state error to zero.
module tb_pi_ctrl;
  import llrf_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        err_valid = 0, u_valid, saturated;
  sample_t     err = '0, u;
  logic [15:0] kp = '0, ki = '0;
  int          checks = 0, failures = 0;
  int          sat_seen = 0;

  pi_ctrl dut (.clk, .rst_n, .err_valid, .err, .kp, .ki, .u_valid, .u, .saturated);

  // phase-loop variant: integrator and output wrap modulo one turn
  sample_t u_w;
  logic    u_valid_w, saturated_w;
  pi_ctrl #(.WRAP(1'b1)) dut_w (.clk, .rst_n, .err_valid, .err, .kp, .ki,
                                .u_valid(u_valid_w), .u(u_w), .saturated(saturated_w));
  longint m_integ_w = 0;
  int     wraps_seen = 0;

  function automatic longint wrap24(input longint v);
    longint m = v & 64'hFF_FFFF;
    return (m >= 64'h80_0000) ? m - 64'h100_0000 : m;
  endfunction

  function automatic longint model_w(input int e, input int p, input int i);
    longint t, o;
    m_integ_w = wrap24(m_integ_w + longint'(e) * longint'(i));
    t = longint'(e) * longint'(p) + m_integ_w;
    o = t >>> 8;
    if (o > 32767 || o < -32768) wraps_seen++;
    o = o & 64'hFFFF;
    return (o >= 32768) ? o - 65536 : o;
  endfunction

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint m_integ = 0;
  localparam longint IMAX = (64'sd1 <<< 23) - 1;
  localparam longint IMIN = -(64'sd1 <<< 23);

  function automatic longint model(input int e, input int p, input int i);
    longint t, o;
    m_integ = m_integ + longint'(e) * longint'(i);
    if (m_integ > IMAX) m_integ = IMAX;
    if (m_integ < IMIN) m_integ = IMIN;
    t = longint'(e) * longint'(p) + m_integ;
    o = t >>> 8;
    if (o > 32767) o = 32767;
    if (o < -32768) o = -32768;
    return o;
  endfunction

  task automatic step(input int e, input int p, input int i, input bit check);
    longint exp_u, exp_w;
    @(negedge clk);
    err_valid = 1; err = sample_t'(e); kp = 16'(p); ki = 16'(i);
    exp_u = model(e, p, i);
    exp_w = model_w(e, p, i);
    @(posedge clk); #1;
    err_valid = 0;
    if (saturated) sat_seen++;
    if (check) begin
      checks++;
      if (!u_valid || longint'(u) != exp_u) begin
        failures++;
        $display("err %0d kp %0d ki %0d: u %0d expected %0d", e, p, i, u, exp_u);
      end
      checks++;
      if (!u_valid_w || longint'(u_w) != exp_w || saturated_w) begin
        failures++;
        $display("wrapping: u %0d expected %0d", u_w, exp_w);
      end
    end
  endtask

  initial begin
    int y, e;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // part 1: random segments, some with a constant error to wind up
    for (int seg = 0; seg < 60; seg++) begin
      int p, i, e0;
      p  = $urandom_range(0, 2047);
      i  = $urandom_range(0, 255);
      e0 = $urandom_range(0, 8000) - 4000;
      for (int r = 0; r < 200; r++)
        step((seg % 3 == 0) ? e0 : $urandom_range(0, 8000) - 4000, p, i, 1);
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("output never clipped"); end
    checks++;
    if (wraps_seen == 0) begin failures++; $display("wrapping variant never wrapped"); end
    // part 2: closed loop, reference 10000, plant gain 1/2
    @(negedge clk) rst_n = 0;
    m_integ_w = 0;
    @(negedge clk) rst_n = 1;
    y = 0;
    for (int r = 0; r < 400; r++) begin
      e = 10000 - y;
      step(e, 'h0100, 'h0040, 0);
      y = int'(u) / 2;
    end
    checks++;
    if (10000 - y > 1 || 10000 - y < -1) begin
      failures++; $display("closed loop left error %0d", 10000 - y);
    end
    $display("closed-loop steady-state error %0d, clipped outputs %0d", 10000 - y, sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

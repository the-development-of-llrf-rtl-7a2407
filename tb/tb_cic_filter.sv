// tb_cic_filter -- self-checking test of the 3-tap CIC filter.
//
// Feeds I/Q pairs every second clock (the demodulator's rate) and compares
// each output with the mean of the last three inputs computed in real
// arithmetic (within one LSB, the rounding of the 1/3 normalisation).  Also
// checks that a constant input comes out unchanged once three samples of it
// have entered, that the output follows its input by exactly one clock, and
// the filter's noise reduction on a random input.
module tb_cic_filter;
  import llrf_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  iq_t  in = '0, out;
  int   checks = 0, failures = 0;

  cic_filter dut (.clk, .rst_n, .in_valid, .in, .out_valid, .out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lv [4] = '{13107, -32768, 32767, -1234};
  int hist_i[3] = '{0, 0, 0};
  int hist_q[3] = '{0, 0, 0};
  real var_in = 0.0, var_out = 0.0;

  task automatic push(input int ii, input int qq, input bit check_dc);
    int ei, eq;
    @(negedge clk);
    in_valid = 1; in.i = sample_t'(ii); in.q = sample_t'(qq);
    hist_i[2] = hist_i[1]; hist_i[1] = hist_i[0]; hist_i[0] = ii;
    hist_q[2] = hist_q[1]; hist_q[1] = hist_q[0]; hist_q[0] = qq;
    ei = $rtoi($floor((hist_i[0] + hist_i[1] + hist_i[2]) / 3.0 + 0.5));
    eq = $rtoi($floor((hist_q[0] + hist_q[1] + hist_q[2]) / 3.0 + 0.5));
    @(posedge clk); #1;
    in_valid = 0;
    // result registered on this edge: exactly one clock of latency
    checks++;
    if (!out_valid) begin failures++; $display("no output one clock after input"); end
    checks++;
    if ((int'(out.i) - ei) > 1 || (int'(out.i) - ei) < -1 ||
        (int'(out.q) - eq) > 1 || (int'(out.q) - eq) < -1) begin
      failures++;
      $display("out %0d,%0d expected %0d,%0d", out.i, out.q, ei, eq);
    end
    if (check_dc) begin
      checks++;
      if (out.i != sample_t'(ii) || out.q != sample_t'(qq)) begin
        failures++; $display("DC not passed: %0d,%0d vs %0d,%0d", out.i, out.q, ii, qq);
      end
    end
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("output valid without input"); end
  endtask

  initial begin
    int v;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // DC levels, including full scale
    for (int k = 0; k < 4; k++) begin
      for (int r = 0; r < 5; r++) push(lv[k], -lv[k] / 2, r >= 2);
    end
    // random input around a DC level: noise must drop
    for (int r = 0; r < 3000; r++) begin
      v = $urandom_range(0, 2000) - 1000;
      push(13000 + v, -5000 - v, 0);
      if (r > 3) begin
        var_in  += real'(v) * real'(v);
        var_out += (real'(out.i) - 13000.0) * (real'(out.i) - 13000.0);
      end
    end
    // three uncorrelated samples averaged: output power about 1/3 of input
    checks++;
    if (var_out > 0.45 * var_in || var_out < 0.2 * var_in) begin
      failures++; $display("noise ratio %f", var_out / var_in);
    end
    $display("noise power ratio out/in = %f (%f dB)", var_out / var_in,
             10.0 * $log10(var_out / var_in));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

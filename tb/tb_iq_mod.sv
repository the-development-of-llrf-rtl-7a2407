// tb_iq_mod -- self-checking test of the IQ modulator and its clock crossing.
//
// Runs a 40 MHz source clock and a 230 MHz DAC clock locked to it (23 DAC
// periods in every 4 source periods, 100 ns).  Random I/Q pairs are handed
// over in the source domain and held; every DAC sample is compared with
// I*cos(2*pi*5n/23) - Q*sin(2*pi*5n/23) computed in real arithmetic (within
// 2 LSB), with n counted by the testbench from reset.  Each new pair must
// reach the DAC output within 5 DAC clocks of its source edge.
`timescale 1ns/1ps
module tb_iq_mod;
  import llrf_pkg::*;

  localparam real PI = 3.14159265358979;

  logic       rst_n = 0;
  logic       clk_src = 0, clk_dac = 0;
  logic       iq_valid = 0;
  iq_t        iq = '0;
  sample_t    dac;
  logic [4:0] lut_idx;
  int         checks = 0, failures = 0;

  iq_mod dut (.rst_n, .clk_src, .iq_valid, .iq, .clk_dac, .dac, .lut_idx);

  // locked clocks, edges placed on an absolute time grid
  initial begin
    realtime t0;
    t0 = $realtime;
    for (longint k = 1; ; k++) begin
      #((t0 + k * 50.0 / 23.0) - $realtime);
      clk_dac = ~clk_dac;
    end
  end
  always #12.5 clk_src = ~clk_src;

  initial begin : watchdog
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int    n_tb = 0;           // table index the DUT used for the sample now on `dac`
  int    since_update = 1000;
  int    cur_i = 0, cur_q = 0;
  int    transfers = 0;
  bit    started = 0;

  always @(posedge clk_dac) begin
    if (rst_n) begin
      #0.1;
      if (started) n_tb = (n_tb + 1) % MOD_LEN;
      started = 1;
      since_update++;
      checks++;
      if (int'(lut_idx) != n_tb) begin
        failures++; $display("table index %0d, expected %0d", lut_idx, n_tb);
      end
      if (since_update >= 5) begin
        real w, e;
        w = 2.0 * PI * 5.0 * n_tb / 23.0;
        e = (cur_i * $cos(w) - cur_q * $sin(w)) * 32767.0 / 32768.0;
        if (e > 32767.0) e = 32767.0;
        if (e < -32768.0) e = -32768.0;
        checks++;
        if (real'(dac) - e > 2.0 || e - real'(dac) > 2.0) begin
          failures++;
          $display("n %0d: dac %0d expected %f (I %0d Q %0d)", n_tb, dac, e, cur_i, cur_q);
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk_src);
    #1 rst_n = 1;
    for (int r = 0; r < 400; r++) begin
      int ii, qq;
      ii = $urandom_range(0, 46000) - 23000;
      qq = $urandom_range(0, 46000) - 23000;
      @(negedge clk_src);
      iq_valid = 1; iq.i = sample_t'(ii); iq.q = sample_t'(qq);
      @(posedge clk_src);
      since_update = 0;
      cur_i = ii; cur_q = qq;
      transfers++;
      #1 iq_valid = 0;
      repeat (2 + (r % 5)) @(posedge clk_src);
    end
    $display("%0d pairs transferred", transfers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

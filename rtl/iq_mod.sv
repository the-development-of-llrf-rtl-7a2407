// iq_mod -- IQ modulation of the controlled I/Q onto the 50 MHz IF for the DAC.
//
// The document modulates the controlled I/Q with lookup tables and a DAC
// clocked at 230 MHz, synchronous to the 40 MHz ADC clock.  At 230 MHz a
// 50 MHz IF advances by 2*pi*5/23 per sample, so 23 samples hold exactly
// five IF periods and a 23-entry cosine table and sine table suffice
// (llrf_pkg::mod_cos / mod_sin).  Each DAC clock produces
//   dac = sat16((I*cos[n] - Q*sin[n]) >> 15),   n = 0..22 cyclically,
// the same x = I*cos - Q*sin convention that iq_demod assumes.
//
// Clock crossing (this design's own): I/Q are produced in the ADC clock
// domain.  On each `iq_valid` the pair is latched into a holding register and
// a toggle flag flips; the flag crosses into the DAC domain through two
// flip-flops, and the edge it shows there loads the held pair into the
// modulator.  A new pair comes at most every two ADC clocks (11.5 DAC
// clocks), longer than the three DAC clocks the crossing needs, so the held
// value is stable when it is taken.
//
// Interface: `dac` is a two's-complement word registered on clk_dac; a new
// I/Q pair takes effect 3 to 4 DAC clocks after the ADC-clock edge that
// latched it.  `lut_idx` is the table index that produced the current `dac`.
module iq_mod
  import llrf_pkg::*;
(
  input  logic       rst_n,
  // ADC clock domain (40 MHz)
  input  logic       clk_src,
  input  logic       iq_valid,
  input  iq_t        iq,
  // DAC clock domain (230 MHz)
  input  logic       clk_dac,
  output sample_t    dac,
  output logic [4:0] lut_idx
);

  // ---------------- source side ----------------
  iq_t  hold;
  logic tog_src;

  always_ff @(posedge clk_src or negedge rst_n) begin
    if (!rst_n) begin
      hold    <= '0;
      tog_src <= 1'b0;
    end else if (iq_valid) begin
      hold    <= iq;
      tog_src <= ~tog_src;
    end
  end

  // ---------------- DAC side ----------------
  logic [2:0] tog_sync;     // [0],[1] synchroniser, [2] previous value
  iq_t        cur;
  logic [4:0] n;
  logic signed [35:0] mix;

  always_ff @(posedge clk_dac or negedge rst_n) begin
    if (!rst_n) begin
      tog_sync <= '0;
      cur      <= '0;
    end else begin
      tog_sync <= {tog_sync[1:0], tog_src};
      if (tog_sync[2] != tog_sync[1])
        cur <= hold;
    end
  end

  assign mix = 36'(cur.i) * 36'(mod_cos(int'(n)))
             - 36'(cur.q) * 36'(mod_sin(int'(n)))
             + (36'sd1 <<< 14);

  always_ff @(posedge clk_dac or negedge rst_n) begin
    if (!rst_n) begin
      n       <= '0;
      dac     <= '0;
      lut_idx <= '0;
    end else begin
      dac     <= sat16(64'(mix >>> 15));
      lut_idx <= n;
      n       <= (n == 5'(MOD_LEN - 1)) ? '0 : n + 5'd1;
    end
  end

endmodule

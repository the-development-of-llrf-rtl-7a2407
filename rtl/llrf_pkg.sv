// llrf_pkg -- types and constants shared by the LLRF signal-processing blocks.
//
// Number formats (one convention for the whole design):
//   * samples, I, Q and amplitudes are 16-bit two's-complement words
//     (the monitoring console shows every quantity as a 4-digit hex word);
//   * phases are 16-bit two's-complement angles where 2^15 stands for pi,
//     so that 16-bit wrap-around is exactly angle wrap-around (-180..+180
//     degrees).  This scale reproduces the relation between the filtered I/Q
//     and the phase words on the console to within the noise of the snapshot.
//   * the I/Q convention is x(t) = I*cos(wt) - Q*sin(wt), so I = A*cos(phi)
//     and Q = A*sin(phi).
// The CORDIC arctangent table, the CORDIC gain and the IQ-modulator sine/
// cosine table are given here as formulas with their rounded values.
package llrf_pkg;

  localparam int SAMPLE_W = 16;
  localparam int ANGLE_W  = 16;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [ANGLE_W-1:0]  angle_t;

  typedef struct packed {
    sample_t i;
    sample_t q;
  } iq_t;

  typedef struct packed {
    sample_t amp;
    angle_t  phase;
  } polar_t;

  // Angles in the 2^15 = pi scale
  localparam angle_t ANGLE_90  = 16'sd16384;
  localparam angle_t ANGLE_180 = -16'sd32768;

  // ------------------------------------------------------------------
  // CORDIC
  // ------------------------------------------------------------------
  localparam int CORDIC_ITER   = 12;  // "12-tap CORDIC"
  localparam int CORDIC_STAGES = 3;   // "three clock periods"
  localparam int CORDIC_GUARD  = 2;   // fractional guard bits inside the CORDIC
  localparam int CORDIC_W      = SAMPLE_W + CORDIC_GUARD + 2;  // + growth (sqrt2 * 1.647)

  // The angle accumulator carries CORDIC_ZG extra fractional bits.
  localparam int CORDIC_ZG = 4;
  typedef logic signed [ANGLE_W+CORDIC_ZG-1:0] cangle_t;

  // atan(2^-i) in the accumulator scale 2^19 = pi: round(atan(2^-i) / pi * 2^19)
  function automatic cangle_t cordic_atan(input int i);
    case (i)
      0:  return 20'sd131072;
      1:  return 20'sd77376;
      2:  return 20'sd40884;
      3:  return 20'sd20753;
      4:  return 20'sd10417;
      5:  return 20'sd5213;
      6:  return 20'sd2607;
      7:  return 20'sd1304;
      8:  return 20'sd652;
      9:  return 20'sd326;
      10: return 20'sd163;
      11: return 20'sd81;
      default: return 20'sd0;
    endcase
  endfunction

  // 1/K for 12 iterations, K = prod sqrt(1 + 2^-2i) = 1.64676; round(2^16 / K)
  localparam int CORDIC_INV_K = 39797;

  // ------------------------------------------------------------------
  // IQ modulation: 50 MHz IF generated at a 230 MHz DAC rate.
  // 50/230 = 5/23, so 23 DAC samples hold exactly five IF periods and the
  // table index n runs 0..22 with angle 2*pi*5*n/23.
  // cos value = round(32767 * cos(2*pi*5*n/23)), sin likewise.
  // ------------------------------------------------------------------
  localparam int MOD_LEN = 23;

  function automatic sample_t mod_cos(input int n);
    case (n)
      0:  return 16'sd32767;   1: return 16'sd6667;    2: return -16'sd30054;
      3:  return -16'sd18896;  4: return 16'sd22365;   5: return 16'sd27997;
      6:  return -16'sd10973;  7: return -16'sd32462;  8: return -16'sd2236;
      9:  return 16'sd31552;  10: return 16'sd15075;  11: return -16'sd25418;
      12: return -16'sd25418; 13: return 16'sd15075;  14: return 16'sd31552;
      15: return -16'sd2236;  16: return -16'sd32462; 17: return -16'sd10973;
      18: return 16'sd27997;  19: return 16'sd22365;  20: return -16'sd18896;
      21: return -16'sd30054; 22: return 16'sd6667;
      default: return 16'sd0;
    endcase
  endfunction

  function automatic sample_t mod_sin(input int n);
    case (n)
      0:  return 16'sd0;       1: return 16'sd32082;   2: return 16'sd13054;
      3:  return -16'sd26770;  4: return -16'sd23947;  5: return 16'sd17025;
      6:  return 16'sd30875;   7: return -16'sd4462;   8: return -16'sd32691;
      9:  return -16'sd8840;  10: return 16'sd29093;  11: return 16'sd20679;
      12: return -16'sd20679; 13: return -16'sd29093; 14: return 16'sd8840;
      15: return 16'sd32691;  16: return 16'sd4462;   17: return -16'sd30875;
      18: return -16'sd17025; 19: return 16'sd23947;  20: return 16'sd26770;
      21: return -16'sd13054; 22: return -16'sd32082;
      default: return 16'sd0;
    endcase
  endfunction

  // ------------------------------------------------------------------
  // Processor exchange: set-points and gains (control memory) and the
  // monitoring values shown on the console.
  // ------------------------------------------------------------------
  localparam int NUM_CTRL_WORDS = 6;
  localparam int NUM_MON_WORDS  = 6;   // per monitoring memory
  localparam int NUM_MEM_BLOCKS = 4;
  localparam int MEM_DEPTH      = 1024;
  localparam int MEM_WIDTH      = 32;
  localparam int MEM_AW         = $clog2(MEM_DEPTH);

  // One access on a memory port: chip select, write enable, address, data
  typedef struct packed {
    logic                 en;
    logic                 we;
    logic [MEM_AW-1:0]    addr;
    logic [MEM_WIDTH-1:0] wdata;
  } mem_req_t;

  typedef logic [MEM_WIDTH-1:0] mem_word_t;

  // Memory assignment of the LLRF side (processor address bits [11:10])
  localparam int MEM_CTRL    = 0;  // set-points and gains, written by the processor
  localparam int MEM_MON_REF = 1;  // reference channel monitoring
  localparam int MEM_MON_CAV = 2;  // cavity channel monitoring
  localparam int MEM_MON_CTL = 3;  // errors, PI outputs, feedback I/Q
  // The forward-power monitoring words share the control memory: the
  // processor writes words 0..5, the LLRF logic writes words 8..13.
  localparam int MON_FWD_BASE = 8;

  typedef struct packed {
    sample_t     set_amp;    // word 0: amplitude set-point offset
    angle_t      set_phase;  // word 1: phase set-point offset
    logic [15:0] kp_amp;     // word 2
    logic [15:0] ki_amp;     // word 3
    logic [15:0] kp_phase;   // word 4
    logic [15:0] ki_phase;   // word 5
  } ctrl_t;

  typedef struct packed {
    iq_t     ref_raw;    // Ref_i, Ref_q
    iq_t     ref_filt;   // Ref_i_filtered, Ref_q_filtered
    polar_t  ref_pol;    // Amp_ref, Phase_ref
    iq_t     cav_raw;    // Cav_i, Cav_q
    iq_t     cav_filt;   // Cav_i_filtered, Cav_q_filtered
    polar_t  cav_pol;    // Amp_cav, Phase_cav
    iq_t     fwd_raw;    // forward power channel: I, Q
    iq_t     fwd_filt;   //   filtered I, Q
    polar_t  fwd_pol;    //   amplitude, phase
    sample_t amp_err;    // Amp_error
    angle_t  phase_err;  // Phase_error
    sample_t amp_pi;     // Amp_pi
    angle_t  phase_pi;   // Phase_pi
    iq_t     fdb;        // Fdb_i, Fdb_q
  } mon_t;

  // Saturate a wide signed value to a 16-bit sample
  function automatic sample_t sat16(input logic signed [63:0] v);
    if (v > 64'sd32767)       return 16'sd32767;
    else if (v < -64'sd32768) return -16'sd32768;
    else                      return sample_t'(v);
  endfunction

endpackage

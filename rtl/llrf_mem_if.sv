// llrf_mem_if -- LLRF-side interface logic of the processor exchange memories.
//
// In the document the processor and the LLRF logic exchange set-points, gains
// and monitoring values through four block memories, and the LLRF logic
// itself generates the chip-select, read and write signals of its side.  This
// block is that logic.  It runs an endless refresh cycle on the LLRF clock:
//   READ    reads the six control words from the control memory (one per
//           clock: set amplitude, set phase, Kp/Ki amplitude, Kp/Ki phase,
//           low 16 bits of words 0..5);
//   WAIT    one clock for the last read word (block-RAM read latency);
//   COMMIT  loads all six words into `ctrl` at once, so the controllers
//           never see a half-updated set of gains, and freezes a snapshot of
//           the monitoring values;
//   WRITE   writes the snapshot to words 0..5 of the three monitoring
//           memories in parallel (reference channel, cavity channel,
//           controller), each 16-bit value sign-extended to 32 bits.  In the
//           same clocks the six forward-power words go to words 8..13 of the
//           control memory, which the processor leaves free.
// One refresh takes 2*6 + 2 = 14 clocks.  The words and their names follow
// the console display of the document; the memory and word assignment and
// the refresh sequence are this design's choices.  `ctrl` resets to zero
// (zero gains: loop open) and the memories start at zero as well.
module llrf_mem_if
  import llrf_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  mon_t      mon,                          // live monitoring values
  output ctrl_t     ctrl,                         // set-points and gains in use
  output logic      ctrl_update,                  // one-clock strobe at COMMIT
  output mem_req_t  req   [NUM_MEM_BLOCKS],       // chip select / write / address / data
  input  mem_word_t rdata [NUM_MEM_BLOCKS]
);

  typedef enum logic [1:0] {S_READ, S_WAIT, S_COMMIT, S_WRITE} state_t;

  localparam int IDX_W = $clog2(NUM_CTRL_WORDS);

  state_t            state;
  logic [IDX_W-1:0]  idx;
  logic              rd_pend;
  logic [IDX_W-1:0]  rd_idx;
  logic [15:0]       shadow [NUM_CTRL_WORDS];
  mon_t              snap;

  // 16-bit monitoring word `w` of monitoring memory `blk`
  function automatic logic [15:0] mon_word(input mon_t m, input int blk, input logic [IDX_W-1:0] w);
    logic [15:0] words [NUM_MON_WORDS];
    case (blk)
      MEM_MON_REF: words = '{m.ref_raw.i, m.ref_raw.q, m.ref_filt.i, m.ref_filt.q,
                             m.ref_pol.amp, m.ref_pol.phase};
      MEM_MON_CAV: words = '{m.cav_raw.i, m.cav_raw.q, m.cav_filt.i, m.cav_filt.q,
                             m.cav_pol.amp, m.cav_pol.phase};
      MEM_MON_CTL: words = '{m.amp_err, m.phase_err, m.amp_pi, m.phase_pi,
                             m.fdb.i, m.fdb.q};
      default:     words = '{m.fwd_raw.i, m.fwd_raw.q, m.fwd_filt.i, m.fwd_filt.q,
                             m.fwd_pol.amp, m.fwd_pol.phase};  // control memory
    endcase
    return words[w];
  endfunction

  always_comb begin
    for (int k = 0; k < NUM_MEM_BLOCKS; k++) begin
      logic [15:0] w16;
      w16          = mon_word(snap, k, idx);
      req[k].en    = 1'b0;
      req[k].we    = 1'b0;
      req[k].addr  = MEM_AW'(idx);
      req[k].wdata = {{(MEM_WIDTH-16){w16[15]}}, w16};
      req[k].en    = (state == S_WRITE);
      req[k].we    = (state == S_WRITE);
      if (k == MEM_CTRL) begin
        // reads the control words, writes the forward-power words
        req[k].en = (state == S_READ) || (state == S_WRITE);
        if (state == S_WRITE) req[k].addr = MEM_AW'(MON_FWD_BASE) + MEM_AW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_READ;
      idx         <= '0;
      rd_pend     <= 1'b0;
      rd_idx      <= '0;
      ctrl        <= '0;
      ctrl_update <= 1'b0;
      snap        <= '0;
      for (int k = 0; k < NUM_CTRL_WORDS; k++) shadow[k] <= '0;
    end else begin
      ctrl_update <= 1'b0;
      rd_pend     <= (state == S_READ);
      rd_idx      <= idx;
      if (rd_pend) shadow[rd_idx] <= rdata[MEM_CTRL][15:0];

      unique case (state)
        S_READ: begin
          if (idx == IDX_W'(NUM_CTRL_WORDS - 1)) begin
            idx   <= '0;
            state <= S_WAIT;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        S_WAIT: state <= S_COMMIT;
        S_COMMIT: begin
          ctrl.set_amp   <= shadow[0];
          ctrl.set_phase <= shadow[1];
          ctrl.kp_amp    <= shadow[2];
          ctrl.ki_amp    <= shadow[3];
          ctrl.kp_phase  <= shadow[4];
          ctrl.ki_phase  <= shadow[5];
          ctrl_update    <= 1'b1;
          snap           <= mon;
          state          <= S_WRITE;
        end
        S_WRITE: begin
          if (idx == IDX_W'(NUM_MON_WORDS - 1)) begin
            idx   <= '0;
            state <= S_READ;
          end else begin
            idx <= idx + 1'b1;
          end
        end
      endcase
    end
  end

endmodule

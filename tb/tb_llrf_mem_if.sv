// tb_llrf_mem_if -- self-checking test of the LLRF-side memory interface.
//
// Four behavioural memories with one clock of read latency stand in for the
// block RAMs.  The testbench changes the control words between refreshes and
// checks that `ctrl` takes all six of them together at the COMMIT strobe,
// that the monitoring memories hold the snapshot frozen at the previous
// COMMIT (sign-extended words, reference / cavity / controller memories,
// and the forward-power words 8..13 of the control memory), that a refresh
// takes 14 clocks, that the monitoring memories are only written, and that
// the control memory gets six reads and six writes per refresh while its
// words 0..5 are never overwritten.
module tb_llrf_mem_if;
  import llrf_pkg::*;

  logic      clk = 0, rst_n = 0;
  mon_t      mon = '0;
  ctrl_t     ctrl;
  logic      ctrl_update;
  mem_req_t  req   [NUM_MEM_BLOCKS];
  mem_word_t rdata [NUM_MEM_BLOCKS];
  int        checks = 0, failures = 0;

  llrf_mem_if dut (.clk, .rst_n, .mon, .ctrl, .ctrl_update, .req, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural memories (first 16 words of each)
  mem_word_t mem [NUM_MEM_BLOCKS][16];
  int        n_rd [NUM_MEM_BLOCKS], n_wr [NUM_MEM_BLOCKS];

  always @(posedge clk) begin
    for (int b = 0; b < NUM_MEM_BLOCKS; b++) begin
      if (req[b].en) begin
        rdata[b] <= mem[b][req[b].addr[3:0]];
        if (req[b].we) begin
          mem[b][req[b].addr[3:0]] <= req[b].wdata;
          n_wr[b]++;
        end else begin
          n_rd[b]++;
        end
      end
    end
  end

  // monitoring values change every clock
  always @(negedge clk) begin
    mon <= {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
            $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  end

  function automatic mem_word_t sx(input logic [15:0] v);
    return {{16{v[15]}}, v};
  endfunction

  mon_t  snap_exp;
  ctrl_t ctrl_exp, ctrl_prev;
  int    last_update = -1, cycle = 0, updates = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    for (int b = 0; b < NUM_MEM_BLOCKS; b++) begin
      n_rd[b] = 0; n_wr[b] = 0;
      for (int w = 0; w < 16; w++) mem[b][w] = '0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++;
    if (ctrl !== '0) begin failures++; $display("ctrl not zero after reset"); end
    for (int r = 0; r < 200; r++) begin
      // new control words, written while the interface is running
      ctrl_prev = ctrl;
      ctrl_exp  = {$urandom, $urandom, $urandom};
      mem[MEM_CTRL][0] = {16'hABCD, ctrl_exp.set_amp};   // upper bits ignored
      mem[MEM_CTRL][1] = {16'h0000, ctrl_exp.set_phase};
      mem[MEM_CTRL][2] = {16'h1234, ctrl_exp.kp_amp};
      mem[MEM_CTRL][3] = {16'h0000, ctrl_exp.ki_amp};
      mem[MEM_CTRL][4] = {16'hFFFF, ctrl_exp.kp_phase};
      mem[MEM_CTRL][5] = {16'h0000, ctrl_exp.ki_phase};
      // the refresh in progress may or may not have seen them; the next
      // complete one must
      repeat (2) begin
        do @(posedge clk); while (!ctrl_update);
      end
      #1;
      checks++;
      if (ctrl !== ctrl_exp) begin
        failures++; $display("ctrl %h expected %h", ctrl, ctrl_exp);
      end
      repeat ($urandom_range(0, 20)) @(posedge clk);
    end
    // access counts: six per refresh, right direction
    @(posedge clk); #1;
    checks++;
    if (n_rd[MEM_MON_REF] != 0 || n_rd[MEM_MON_CAV] != 0 ||
        n_rd[MEM_MON_CTL] != 0) begin
      failures++; $display("wrong access direction");
    end
    checks++;
    if (n_rd[MEM_CTRL] < 6 * updates || n_rd[MEM_CTRL] > 6 * (updates + 2) ||
        n_wr[MEM_MON_CAV] < 6 * (updates - 1) || n_wr[MEM_MON_CAV] > 6 * (updates + 1) ||
        n_wr[MEM_CTRL] != n_wr[MEM_MON_CAV]) begin
      failures++; $display("access counts %0d reads %0d writes for %0d refreshes",
                           n_rd[MEM_CTRL], n_wr[MEM_MON_CAV], updates);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // at every commit: refresh period, and the snapshot of the previous commit
  // must be in the monitoring memories; ctrl changes only at the strobe
  ctrl_t ctrl_q;
  always @(posedge clk) begin
    mon_t sn;
    #1;
    if (rst_n && ctrl_update) begin
      updates++;
      if (last_update >= 0) begin
        checks++;
        if (cycle - last_update != 14) begin
          failures++; $display("refresh took %0d clocks", cycle - last_update);
        end
        sn = snap_exp;
        checks++;
        if (mem[MEM_MON_REF][0] !== sx(sn.ref_raw.i)   || mem[MEM_MON_REF][1] !== sx(sn.ref_raw.q)  ||
            mem[MEM_MON_REF][2] !== sx(sn.ref_filt.i)  || mem[MEM_MON_REF][3] !== sx(sn.ref_filt.q) ||
            mem[MEM_MON_REF][4] !== sx(sn.ref_pol.amp) || mem[MEM_MON_REF][5] !== sx(sn.ref_pol.phase) ||
            mem[MEM_MON_CAV][0] !== sx(sn.cav_raw.i)   || mem[MEM_MON_CAV][1] !== sx(sn.cav_raw.q)  ||
            mem[MEM_MON_CAV][2] !== sx(sn.cav_filt.i)  || mem[MEM_MON_CAV][3] !== sx(sn.cav_filt.q) ||
            mem[MEM_MON_CAV][4] !== sx(sn.cav_pol.amp) || mem[MEM_MON_CAV][5] !== sx(sn.cav_pol.phase) ||
            mem[MEM_MON_CTL][0] !== sx(sn.amp_err)     || mem[MEM_MON_CTL][1] !== sx(sn.phase_err) ||
            mem[MEM_MON_CTL][2] !== sx(sn.amp_pi)      || mem[MEM_MON_CTL][3] !== sx(sn.phase_pi) ||
            mem[MEM_MON_CTL][4] !== sx(sn.fdb.i)       || mem[MEM_MON_CTL][5] !== sx(sn.fdb.q)) begin
          failures++; $display("monitoring memories do not hold the snapshot");
        end
        checks++;
        if (mem[MEM_CTRL][MON_FWD_BASE+0] !== sx(sn.fwd_raw.i)   ||
            mem[MEM_CTRL][MON_FWD_BASE+1] !== sx(sn.fwd_raw.q)   ||
            mem[MEM_CTRL][MON_FWD_BASE+2] !== sx(sn.fwd_filt.i)  ||
            mem[MEM_CTRL][MON_FWD_BASE+3] !== sx(sn.fwd_filt.q)  ||
            mem[MEM_CTRL][MON_FWD_BASE+4] !== sx(sn.fwd_pol.amp) ||
            mem[MEM_CTRL][MON_FWD_BASE+5] !== sx(sn.fwd_pol.phase)) begin
          failures++; $display("forward-power words do not hold the snapshot");
        end
      end
      last_update = cycle;
      snap_exp    = mon;      // value present at the commit edge
    end
    if (rst_n && !ctrl_update && ctrl !== ctrl_q) begin
      failures++; $display("ctrl changed outside COMMIT");
    end
    ctrl_q = ctrl;
  end
endmodule

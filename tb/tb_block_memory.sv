// tb_block_memory -- self-checking test of the four exchange memories.
//
// The host bus (address bits [11:10] select the memory) writes a distinct
// pattern into every memory; each memory's LLRF-side port must then return
// only its own memory's data.  The LLRF ports then write to all four
// memories in the same clock, and the host reads the words back through the
// address decoder, checking the one-clock read latency and the selection.
module tb_block_memory;
  import llrf_pkg::*;

  logic        clk_host = 0, clk_llrf = 0;
  logic        host_en = 0, host_we = 0;
  logic [11:0] host_addr = '0;
  mem_word_t   host_wdata = '0, host_rdata;
  mem_req_t    llrf_req   [4];
  mem_word_t   llrf_rdata [4];
  int          checks = 0, failures = 0;

  block_memory dut (.clk_host, .host_en, .host_we, .host_addr, .host_wdata, .host_rdata,
                    .clk_llrf, .llrf_req, .llrf_rdata);

  always #5    clk_host = ~clk_host;
  always #12.5 clk_llrf = ~clk_llrf;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mem_word_t pat(input int blk, input int w, input int gen);
    return {8'(blk), 8'(gen), 16'(w * 37 + blk)};
  endfunction

  task automatic host(input bit we, input int blk, input int w, input mem_word_t d,
                      input bit chk, input mem_word_t expect_d);
    @(negedge clk_host);
    host_en = 1; host_we = we; host_addr = {2'(blk), 10'(w)}; host_wdata = d;
    @(posedge clk_host); #1;
    host_en = 0; host_we = 0;
    // the bus moves on to another memory: the read data must not follow
    host_addr = {2'(blk + 1), 10'(w)};
    #1;
    if (chk) begin
      checks++;
      if (host_rdata !== expect_d) begin
        failures++; $display("host read m%0d[%0d] = %h, expected %h", blk, w, host_rdata, expect_d);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) llrf_req[k] = '0;
    repeat (2) @(posedge clk_host);
    for (int b = 0; b < 4; b++)
      for (int w = 0; w < 64; w++) host(1, b, w, pat(b, w, 1), 0, '0);
    // all four LLRF ports read the same word index in the same clock
    for (int w = 0; w < 64; w++) begin
      @(negedge clk_llrf);
      for (int b = 0; b < 4; b++) begin
        llrf_req[b].en = 1; llrf_req[b].we = 0; llrf_req[b].addr = 10'(w);
      end
      @(posedge clk_llrf); #1;
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (llrf_rdata[b] !== pat(b, w, 1)) begin
          failures++; $display("llrf m%0d[%0d] = %h", b, w, llrf_rdata[b]);
        end
      end
    end
    // all four LLRF ports write in the same clock
    for (int w = 0; w < 64; w++) begin
      @(negedge clk_llrf);
      for (int b = 0; b < 4; b++) begin
        llrf_req[b].en = 1; llrf_req[b].we = 1; llrf_req[b].addr = 10'(w + 500);
        llrf_req[b].wdata = pat(b, w, 2);
      end
    end
    @(negedge clk_llrf);
    for (int b = 0; b < 4; b++) llrf_req[b] = '0;
    // host reads them back, interleaving the memories
    for (int w = 0; w < 64; w++)
      for (int b = 3; b >= 0; b--) host(0, b, w + 500, '0, 1, pat(b, w, 2));
    // and the first pattern is still in place
    for (int w = 0; w < 64; w += 7)
      for (int b = 0; b < 4; b++) host(0, b, w, '0, 1, pat(b, w, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

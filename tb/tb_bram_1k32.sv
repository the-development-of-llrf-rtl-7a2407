// tb_bram_1k32 -- self-checking test of the dual-port 1024 x 32 memory.
//
// Port A (10 ns clock) and port B (7 ns clock) run on unrelated clocks.  The
// test fills the memory from A, reads it all back from B, then lets B rewrite
// the upper half while A reads the lower half at the same time, reads the
// upper half from A, and lets B write words spread over the whole range.  A reference array holds the expected
// contents.  It also checks the zero start contents, the one-clock read
// latency and that a write returns the old word (read-first).
module tb_bram_1k32;

  logic        clk_a = 0, clk_b = 0;
  logic        en_a = 0, we_a = 0, en_b = 0, we_b = 0;
  logic [9:0]  addr_a = '0, addr_b = '0;
  logic [31:0] wdata_a = '0, wdata_b = '0, rdata_a, rdata_b;
  int          checks = 0, failures = 0;
  logic [31:0] ref_mem [1024];

  bram_1k32 dut (.clk_a, .en_a, .we_a, .addr_a, .wdata_a, .rdata_a,
                 .clk_b, .en_b, .we_b, .addr_b, .wdata_b, .rdata_b);

  always #5   clk_a = ~clk_a;
  always #3.5 clk_b = ~clk_b;

  initial begin : watchdog
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic acc_a(input bit we, input int adr, input logic [31:0] d, input bit chk);
    logic [31:0] old;
    @(negedge clk_a);
    en_a = 1; we_a = we; addr_a = 10'(adr); wdata_a = d;
    old = ref_mem[adr];
    if (we) ref_mem[adr] = d;
    @(posedge clk_a); #1;
    en_a = 0; we_a = 0;
    if (chk) begin
      checks++;
      if (rdata_a !== old) begin
        failures++; $display("A addr %0d: read %h expected %h", adr, rdata_a, old);
      end
    end
  endtask

  task automatic acc_b(input bit we, input int adr, input logic [31:0] d, input bit chk);
    logic [31:0] old;
    @(negedge clk_b);
    en_b = 1; we_b = we; addr_b = 10'(adr); wdata_b = d;
    old = ref_mem[adr];
    if (we) ref_mem[adr] = d;
    @(posedge clk_b); #1;
    en_b = 0; we_b = 0;
    if (chk) begin
      checks++;
      if (rdata_b !== old) begin
        failures++; $display("B addr %0d: read %h expected %h", adr, rdata_b, old);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 1024; k++) ref_mem[k] = '0;
    repeat (2) @(posedge clk_a);
    for (int k = 0; k < 8; k++) acc_b(0, k * 100, '0, 1);          // zero start
    for (int k = 0; k < 1024; k++) acc_a(1, k, $urandom, k < 16);  // fill, read-first
    for (int k = 0; k < 1024; k++) acc_b(0, k, '0, 1);             // read back on B
    // concurrent: B writes upper half, A reads lower half
    fork
      for (int k = 512; k < 1024; k++) acc_b(1, k, $urandom, 1);
      for (int k = 0; k < 512; k++)    acc_a(0, k, '0, 1);
    join
    for (int k = 512; k < 1024; k++) acc_a(0, k, '0, 1);
    // B writes across the whole range, A reads back
    for (int k = 0; k < 1024; k += 3) acc_b(1, k, $urandom, 0);
    for (int k = 0; k < 1024; k += 3) acc_a(0, k, '0, 1);
    // enable low: the read register holds its value
    acc_a(0, 7, '0, 1);
    @(negedge clk_a); addr_a = 10'd9;
    @(posedge clk_a); #1;
    checks++;
    if (rdata_a !== ref_mem[7]) begin failures++; $display("read data changed without enable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

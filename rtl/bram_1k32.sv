// bram_1k32 -- one 1024 x 32 true dual-port block memory.
//
// The document exchanges data between the processor and the LLRF logic
// through four memory blocks of 1024 x 32 bits.  Each is modelled here as an
// FPGA block RAM with two independent ports on their own clocks: port A for
// the processor bus, port B for the LLRF logic.  Either port can read or
// write.  Timing (this design's choice, matching common block RAMs): a port
// with `en` high performs its access on the clock edge; `rdata` shows the
// addressed word one clock later, the old contents when the same edge
// writes it (read-first).  If both ports write one address on the same
// cycle the result is undefined, as in the FPGA primitive.  The contents
// start at zero, as an FPGA configures an uninitialised block RAM.
//
// The memory array is written from two clocked processes, one per port.
// Lint tools report this as a signal with several drivers; it is the usual
// way to describe a true dual-port RAM with two clocks, and FPGA synthesis
// maps it onto one block RAM primitive.
module bram_1k32 #(
  parameter int DEPTH = 1024,
  parameter int WIDTH = 32,
  parameter int AW    = $clog2(DEPTH)
) (
  // port A: processor side
  input  logic             clk_a,
  input  logic             en_a,
  input  logic             we_a,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] wdata_a,
  output logic [WIDTH-1:0] rdata_a,
  // port B: LLRF-logic side
  input  logic             clk_b,
  input  logic             en_b,
  input  logic             we_b,
  input  logic [AW-1:0]    addr_b,
  input  logic [WIDTH-1:0] wdata_b,
  output logic [WIDTH-1:0] rdata_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int k = 0; k < DEPTH; k++) mem[k] = '0;
  end

  always_ff @(posedge clk_a) begin
    if (en_a) begin
      rdata_a <= mem[addr_a];
      if (we_a) mem[addr_a] <= wdata_a;
    end
  end

  always_ff @(posedge clk_b) begin
    if (en_b) begin
      rdata_b <= mem[addr_b];
      if (we_b) mem[addr_b] <= wdata_b;
    end
  end

endmodule

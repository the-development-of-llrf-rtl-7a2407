// block_memory -- the four 1024 x 32 exchange memories between the processor
// and the LLRF logic.
//
// Four bram_1k32 instances, as the document gives them.  The processor side
// is one bus (`host`): address bits [11:10] choose the memory and bits [9:0]
// the word, and read data comes back one host clock after the access from the
// memory that was addressed.  The LLRF side keeps the four ports separate
// (`llrf_req[k]`, `llrf_rdata[k]`) so the interface logic can use them all in
// the same clock.  The address map and the bus decoding are this design's
// choice; the document only names the memories.
module block_memory
  import llrf_pkg::*;
#(
  parameter int BLOCKS = NUM_MEM_BLOCKS,
  parameter int DEPTH  = MEM_DEPTH
) (
  // processor side
  input  logic             clk_host,
  input  logic             host_en,
  input  logic             host_we,
  input  logic [$clog2(BLOCKS)+$clog2(DEPTH)-1:0] host_addr,
  input  mem_word_t        host_wdata,
  output mem_word_t        host_rdata,
  // LLRF side
  input  logic             clk_llrf,
  input  mem_req_t         llrf_req   [BLOCKS],
  output mem_word_t        llrf_rdata [BLOCKS]
);

  localparam int AW = $clog2(DEPTH);
  localparam int BW = $clog2(BLOCKS);

  logic [BW-1:0] sel, sel_q;
  mem_word_t     rdata_a [BLOCKS];

  assign sel = host_addr[AW +: BW];

  for (genvar k = 0; k < BLOCKS; k++) begin : g_mem
    bram_1k32 #(.DEPTH(DEPTH), .WIDTH(MEM_WIDTH)) u_mem (
      .clk_a   (clk_host),
      .en_a    (host_en && (sel == BW'(k))),
      .we_a    (host_we),
      .addr_a  (host_addr[AW-1:0]),
      .wdata_a (host_wdata),
      .rdata_a (rdata_a[k]),
      .clk_b   (clk_llrf),
      .en_b    (llrf_req[k].en),
      .we_b    (llrf_req[k].we),
      .addr_b  (llrf_req[k].addr[AW-1:0]),
      .wdata_b (llrf_req[k].wdata),
      .rdata_b (llrf_rdata[k])
    );
  end

  always_ff @(posedge clk_host) begin
    if (host_en) sel_q <= sel;
  end

  assign host_rdata = rdata_a[sel_q];

endmodule

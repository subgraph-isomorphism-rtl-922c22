// bloom_ram: the bloom-filter memories, one per memory bank.
//
// With two-way parallelism every structure that describes data edges is
// doubled, the blooms included: bank b holds the blooms of edges whose
// indexing node hashes with MSB = b. Each bank has 2**(TABLE_W+H1_W) words
// of BLOOM_W bits addressed by {table, low hash bits}. Preprocess writes
// through the write port; findmin reads through the read port.
//
// Doubling the bloom space and selecting it by hash MSB follow the reference
// architecture, where the blooms sit in DRAM behind two AXI ports. Here they
// are on-chip synchronous RAMs; word width and address layout are this
// design's choices.
//
// Timing: write on the clock edge when wr_en; read data is registered and
// valid the cycle after rd_en.
module bloom_ram
  import less_pkg::*;
#(
  parameter int unsigned BANKS = 2,
  parameter int unsigned AW    = TABLE_W + H1_W
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(BANKS)-1:0] wr_bank,
  input  logic [AW-1:0]            wr_addr,
  input  bloom_t                   wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(BANKS)-1:0] rd_bank,
  input  logic [AW-1:0]            rd_addr,
  output bloom_t                   rd_data
);
  // banks stacked in one array: word address = {bank, addr}
  bloom_t mem [BANKS * 2**AW];

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_bank, wr_addr}] <= wr_data;
    if (rd_en) rd_data <= mem[{rd_bank, rd_addr}];
  end
endmodule

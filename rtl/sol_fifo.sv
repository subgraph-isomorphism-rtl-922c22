// sol_fifo: the partial-solution FIFO at the head of the MWJ loop.
//
// Holds 32-bit node words: radices (bit 31 set) and extensions. The assembly
// stage writes partial solutions back into it and the propose/enlarge stage
// reads them out. In the reference system this queue lives in DRAM behind an
// AXI master; here it is an on-chip circular buffer, and its depth is this
// design's choice.
//
// Interface: valid/ready on both sides. A word is taken when wr_valid and
// wr_ready are both high and given when rd_valid and rd_ready are both high.
// Read data comes straight from the array (first-word fall-through), so a
// written word can be read the cycle after it was written. count is the
// number of words held.
module sol_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_valid,
  output logic         wr_ready,
  input  logic [W-1:0] wr_data,
  output logic         rd_valid,
  input  logic         rd_ready,
  output logic [W-1:0] rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign wr_ready = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rp];
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + $bits(count)'(do_wr) - $bits(count)'(do_rd);
    end
  end

  // Data offered on the read side must stay until taken.
  a_rd_stable: assert property (@(posedge clk) disable iff (!rst_n)
    rd_valid && !rd_ready |=> rd_valid && $stable(rd_data));
endmodule

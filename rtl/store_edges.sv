// store_edges: splits the data edges into per-bank edge blocks (preprocess).
//
// A data edge (src, dst, labels) belongs to a table if its label pair, in
// either direction, is a table of the query (labelToTable). For each
// direction that exists, the indexing node (src for src->dst, dst for
// dst->src) is hashed: the hash MSB picks the memory bank, and the block
// inside the bank is {table, low H1_W hash bits}. Storing is done in the
// classic two passes over the edge list:
//   1. count pass  (phase = 0): one counter per block is incremented;
//   2. prefix      (prefix pulse): counters become start offsets, so the
//      blocks of each bank lie back to back in its edge space;
//   3. store pass  (phase = 1): each edge is written to its bank at the
//      running offset of its block, which is then incremented.
// After the store pass blk_end of a block is its end address and blk_cnt its
// edge count (start = end - count). The count/store wrappers, the BRAM
// counters turned into offsets and the hash MSB selecting one of two banks
// follow the reference design; the stored word ({indexing, indexed}), the
// counter width and the command protocol are this design's choices.
//
// Interface: clear pulse zeroes the counters (2**(TABLE_W+H1_W) cycles,
// busy high); a prefix pulse takes as long. Edges enter with valid/ready;
// the src->dst direction is handled in the first cycle and the dst->src
// direction, when it exists, in a second one. clear and prefix are taken only
// between edges. The
// labelToTable lookups are combinational ports. The per-bank edge memory
// write ports em_* are driven during the store pass.
module store_edges
  import less_pkg::*;
#(
  parameter int unsigned BLK_W = TABLE_W + H1_W,
  parameter int unsigned EA_W  = 24
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   prefix,
  output logic   busy,
  input  logic   phase,       // 0 count pass, 1 store pass
  input  logic   e_valid,
  output logic   e_ready,
  input  edge_t  e_in,
  // labelToTable: [0] src->dst, [1] dst->src
  output label_t l2t_from [2],
  output label_t l2t_to   [2],
  input  logic   l2t_hit  [2],
  input  table_t l2t_id   [2],
  // per-bank edge memory write ports
  output logic [1:0]      em_wr_en,
  output logic [EA_W-1:0] em_wr_addr [2],
  output logic [63:0]     em_wr_data [2],
  // block table read port
  input  logic            blk_bank,
  input  logic [BLK_W-1:0] blk_idx,
  output logic [EA_W-1:0] blk_end,
  output logic [EA_W-1:0] blk_cnt,
  output logic [31:0]     bank_count [2]
);
  localparam int unsigned NB = 2 ** BLK_W;

  typedef enum logic [1:0] {S_RUN, S_CLEAR, S_PREFIX} state_e;

  state_e          state;
  // per-bank counter (cnt) and offset (off) RAMs, read asynchronously
  logic [EA_W-1:0] cnt_rd_blk [2], off_rd_blk [2], cnt_rd_k [2], off_rd_q [2], cnt_rd_q [2];
  logic [EA_W-1:0] acc [2];
  logic [BLK_W-1:0] k;
  logic            dir;     // direction being handled for the current edge

  // direction under work: 0 src indexes dst, 1 dst indexes src
  node_t      ing, ed, h;
  logic       has [2];
  logic       bank;
  logic [BLK_W-1:0] blk;
  logic       act, last_dir;

  assign l2t_from[0] = e_in.lsrc;
  assign l2t_to[0]   = e_in.ldst;
  assign l2t_from[1] = e_in.ldst;
  assign l2t_to[1]   = e_in.lsrc;
  assign has[0] = l2t_hit[0];
  assign has[1] = l2t_hit[1];

  assign ing  = dir ? e_in.dst : e_in.src;
  assign ed   = dir ? e_in.src : e_in.dst;
  assign h    = node_hash(ing);
  assign bank = h[NODE_W-1];
  assign blk  = {l2t_id[dir], h[H1_W-1:0]};
  // work on this direction if it exists; dir 0 is skipped when absent
  assign act      = has[dir];
  assign last_dir = dir || !has[1];

  assign busy    = (state != S_RUN);
  assign e_ready = (state == S_RUN) && e_valid && last_dir;

  always_comb begin
    em_wr_en = '0;
    for (int b = 0; b < 2; b++) begin
      em_wr_addr[b] = off_rd_blk[b];
      em_wr_data[b] = {ing, ed};
    end
    if (state == S_RUN && e_valid && phase && act) em_wr_en[bank] = 1'b1;
  end

  assign blk_end = off_rd_q[blk_bank];
  assign blk_cnt = cnt_rd_q[blk_bank];

  // One write port per bank and per array, so both arrays map to RAMs.
  logic             cnt_we [2], off_we [2];
  logic [BLK_W-1:0] cnt_wa [2], off_wa [2];
  logic [EA_W-1:0]  cnt_wd [2], off_wd [2];

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      cnt_we[b] = 1'b0;
      off_we[b] = 1'b0;
      cnt_wa[b] = blk;
      off_wa[b] = blk;
      cnt_wd[b] = cnt_rd_blk[b] + 1'b1;
      off_wd[b] = off_rd_blk[b] + 1'b1;
      unique case (state)
        S_CLEAR: begin
          cnt_we[b] = 1'b1; cnt_wa[b] = k; cnt_wd[b] = '0;
          off_we[b] = 1'b1; off_wa[b] = k; off_wd[b] = '0;
        end
        S_PREFIX: begin
          off_we[b] = 1'b1; off_wa[b] = k; off_wd[b] = acc[b];
        end
        S_RUN: if (!clear && !prefix && e_valid && act && bank == b[0]) begin
          if (!phase) cnt_we[b] = 1'b1;
          else        off_we[b] = 1'b1;
        end
        default: ;
      endcase
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    logic [EA_W-1:0] cnt [NB];
    logic [EA_W-1:0] off [NB];

    always_ff @(posedge clk) begin
      if (cnt_we[b]) cnt[cnt_wa[b]] <= cnt_wd[b];
      if (off_we[b]) off[off_wa[b]] <= off_wd[b];
    end

    assign cnt_rd_blk[b] = cnt[blk];
    assign off_rd_blk[b] = off[blk];
    assign cnt_rd_k[b]   = cnt[k];
    assign cnt_rd_q[b]   = cnt[blk_idx];
    assign off_rd_q[b]   = off[blk_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_CLEAR;
      k             <= '0;
      dir           <= 1'b0;
      acc[0]        <= '0;
      acc[1]        <= '0;
      bank_count[0] <= '0;
      bank_count[1] <= '0;
    end else begin
      unique case (state)
        S_CLEAR: begin
          k <= k + 1'b1;
          if (k == BLK_W'(NB - 1)) state <= S_RUN;
        end
        S_PREFIX: begin
          for (int b = 0; b < 2; b++) acc[b] <= acc[b] + cnt_rd_k[b];
          k <= k + 1'b1;
          if (k == BLK_W'(NB - 1)) state <= S_RUN;
        end
        S_RUN: begin
          if (clear) begin
            state         <= S_CLEAR;
            k             <= '0;
            bank_count[0] <= '0;
            bank_count[1] <= '0;
          end else if (prefix) begin
            state  <= S_PREFIX;
            k      <= '0;
            acc[0] <= '0;
            acc[1] <= '0;
          end else if (e_valid) begin
            if (act && !phase) bank_count[bank] <= bank_count[bank] + 1;
            dir <= last_dir ? 1'b0 : 1'b1;
          end
        end
        default: state <= S_RUN;
      endcase
    end
  end
endmodule

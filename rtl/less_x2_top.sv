// less_x2_top: two-way parallel dataflow of the LESS subgraph-isomorphism
// core (multi-way join), with the preprocess blocks that split the data
// edges over two memory banks.
//
// Partial solutions circulate in a loop: FIFO -> decompression -> edgebuild
// -> findmin -> findchannel -> (two channels: readmin + homomorphism) ->
// merge_h -> seqbuild/tuplebuild -> (two channels: intersect .. compact) ->
// mergeasmset -> filter -> merge solandset -> assembly -> FIFO. Every node's
// edges live in the bank given by the MSB of its hash, so each channel reads
// one bank only. This top holds the blocks whose behaviour is specified
// (FIFO, decompression, findmin with its two bloom banks, channel split,
// homomorphism per channel, hstream merge, tuple split with padding, merge of
// the verified tuples, complete-solution detection, and on the preprocess
// side the table descriptors and the count/store edge split). The tasks in
// between (edgebuild, readmin counters/edges, seqbuild, tuplebuild's tuple
// generation, intersect .. compact, filter, merge solandset, assembly,
// writeBloom, blockToHTB) and the DRAM are outside: their streams are ports.
//
// All streams use valid/ready handshakes; a beat moves when both are high.
// Port groups:
//   fifo_wr_*   partial-solution words written back by assembly
//   dec_*       decompressed packets to edgebuild
//   fm_t_*/fm_s_*  edgebuild tuples and packets into findmin
//   bl_wr_*     bloom writes from preprocess
//   rc_t_*/rc_b_*  per channel: minset tuple and bloom to readmin
//   hm_m_*/hm_e_*  per channel: minset word and candidate nodes from readmin
//   hs_*        merged hstream to seqbuild
//   tb_i_*      tuples out of tuplebuild's core
//   ch_t_*      per channel: intersect tuples to intersect..compact
//   ch_v_*      per channel: verified tuples back from compact
//   asm_*       joined tuples to filter
//   fs_*        solutions with complete-flag to merge solandset
//   q_* / qv_*  query loading and table descriptors
//   pe_* / em_* / blk_*  data edges in, per-bank edge writes, block table
module less_x2_top
  import less_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned EA_W       = 24
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [$clog2(MAX_QV+1)-1:0] nq,
  // partial-solution FIFO write (assembly)
  input  logic        fifo_wr_valid,
  output logic        fifo_wr_ready,
  input  node_t       fifo_wr_data,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count,
  // decompressed packets to edgebuild
  output logic        dec_valid,
  input  logic        dec_ready,
  output vertex_t     dec_out,
  // edgebuild to findmin
  input  logic        fm_t_valid,
  output logic        fm_t_ready,
  input  fmin_tuple_t fm_t_in,
  input  logic        fm_s_valid,
  output logic        fm_s_ready,
  input  vertex_t     fm_s_in,
  // bloom writes
  input  logic        bl_wr_en,
  input  logic        bl_wr_bank,
  input  logic [TABLE_W+H1_W-1:0] bl_wr_addr,
  input  bloom_t      bl_wr_data,
  // per channel: to readmin
  output logic [1:0]  rc_t_valid,
  input  logic [1:0]  rc_t_ready,
  output fmin_tuple_t rc_t_out [2],
  output logic [1:0]  rc_b_valid,
  input  logic [1:0]  rc_b_ready,
  output bloom_t      rc_b_out [2],
  // per channel: from readmin edge
  input  logic [1:0]  hm_m_valid,
  output logic [1:0]  hm_m_ready,
  input  node_t       hm_m_in [2],
  input  logic [1:0]  hm_e_valid,
  output logic [1:0]  hm_e_ready,
  input  vertex_t     hm_e_in [2],
  // merged hstream
  output logic        hs_valid,
  input  logic        hs_ready,
  output seq_t        hs_out,
  // tuplebuild core output
  input  logic        tb_i_valid,
  output logic        tb_i_ready,
  input  itup_t       tb_i_in,
  // per channel: intersect..compact chain
  output logic [1:0]  ch_t_valid,
  input  logic [1:0]  ch_t_ready,
  output itup_t       ch_t_out [2],
  input  logic [1:0]  ch_v_valid,
  output logic [1:0]  ch_v_ready,
  input  itup_t       ch_v_in [2],
  // joined tuples to filter
  output logic        asm_valid,
  input  logic        asm_ready,
  output itup_t       asm_out,
  // solutions with complete flag to merge solandset
  output logic        fs_valid,
  input  logic        fs_ready,
  output vertex_t     fs_out,
  output logic        fs_full,
  // query loading
  input  logic        q_clear,
  input  logic        q_v_valid,
  input  logic [$clog2(MAX_QV)-1:0] q_v_num,
  input  logic [$clog2(MAX_QV)-1:0] q_v_pos,
  input  logic        q_e_valid,
  input  logic [$clog2(MAX_QV)-1:0] q_e_src,
  input  logic [$clog2(MAX_QV)-1:0] q_e_dst,
  input  label_t      q_e_lsrc,
  input  label_t      q_e_ldst,
  input  logic [$clog2(MAX_QV)-1:0] qv_num,
  input  logic [$clog2(MAX_QV)-1:0] qv_idx,
  output logic [$clog2(MAX_QV+1)-1:0] qv_n_indexing,
  output logic [$clog2(MAX_QV+1)-1:0] qv_n_indexed,
  output table_t      qv_indexing_tbl,
  output logic [$clog2(MAX_QV)-1:0] qv_indexing_peer,
  output table_t      qv_indexed_tbl,
  output logic [$clog2(MAX_QV)-1:0] qv_indexed_peer,
  output logic [TABLE_W:0] num_tables,
  // data edges split
  input  logic        pe_clear,
  input  logic        pe_prefix,
  output logic        pe_busy,
  input  logic        pe_phase,
  input  logic        pe_valid,
  output logic        pe_ready,
  input  edge_t       pe_in,
  output logic [1:0]      em_wr_en,
  output logic [EA_W-1:0] em_wr_addr [2],
  output logic [63:0]     em_wr_data [2],
  input  logic            blk_bank,
  input  logic [TABLE_W+H1_W-1:0] blk_idx,
  output logic [EA_W-1:0] blk_end,
  output logic [EA_W-1:0] blk_cnt,
  // statistics
  output logic [31:0] st_routed [2],
  output logic [31:0] st_dropped [2],
  output logic [31:0] st_seqs [2],
  output logic [31:0] st_paddings,
  output logic [31:0] st_syncs,
  output logic [31:0] st_full,
  output logic [31:0] st_bank_edges [2]
);
  // ---------------- edgebuild branch ----------------
  logic  fifo_rd_valid, fifo_rd_ready;
  node_t fifo_rd_data;

  sol_fifo #(.W(NODE_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_valid(fifo_wr_valid), .wr_ready(fifo_wr_ready), .wr_data(fifo_wr_data),
    .rd_valid(fifo_rd_valid), .rd_ready(fifo_rd_ready), .rd_data(fifo_rd_data),
    .count(fifo_count));

  mwj_enlarge_sol u_enlarge (
    .clk, .rst_n,
    .in_valid(fifo_rd_valid), .in_ready(fifo_rd_ready), .in_word(fifo_rd_data),
    .out_valid(dec_valid), .out_ready(dec_ready), .out(dec_out));

  logic                      bl_rd_en, bl_rd_bank;
  logic [TABLE_W+H1_W-1:0]   bl_rd_addr;
  bloom_t                    bl_rd_data;

  bloom_ram #(.BANKS(2)) u_blooms (
    .clk,
    .wr_en(bl_wr_en), .wr_bank(bl_wr_bank), .wr_addr(bl_wr_addr), .wr_data(bl_wr_data),
    .rd_en(bl_rd_en), .rd_bank(bl_rd_bank), .rd_addr(bl_rd_addr), .rd_data(bl_rd_data));

  logic        mt_valid, mt_ready, mb_valid, mb_ready, ms_valid, ms_ready;
  fmin_tuple_t mt;
  bloom_t      mb;
  vertex_t     ms;

  mwj_findmin u_findmin (
    .clk, .rst_n,
    .t_valid(fm_t_valid), .t_ready(fm_t_ready), .t_in(fm_t_in),
    .s_valid(fm_s_valid), .s_ready(fm_s_ready), .s_in(fm_s_in),
    .bl_rd_en, .bl_rd_bank, .bl_rd_addr, .bl_rd_data,
    .mt_valid, .mt_ready, .mt_out(mt),
    .mb_valid, .mb_ready, .mb_out(mb),
    .ms_valid, .ms_ready, .ms_out(ms));

  logic [1:0] cs_valid, cs_ready;
  vertex_t    cs [2];

  mwj_findchannel u_findchannel (
    .clk, .rst_n,
    .t_valid(mt_valid), .t_ready(mt_ready), .t_in(mt),
    .b_valid(mb_valid), .b_ready(mb_ready), .b_in(mb),
    .s_valid(ms_valid), .s_ready(ms_ready), .s_in(ms),
    .ot_valid(rc_t_valid), .ot_ready(rc_t_ready), .ot_out(rc_t_out),
    .ob_valid(rc_b_valid), .ob_ready(rc_b_ready), .ob_out(rc_b_out),
    .os_valid(cs_valid), .os_ready(cs_ready), .os_out(cs),
    .routed(st_routed));

  logic [1:0] h_valid, h_ready;
  seq_t       h [2];

  for (genvar c = 0; c < 2; c++) begin : g_homo
    mwj_homomorphism u_homo (
      .clk, .rst_n,
      .s_valid(cs_valid[c]), .s_ready(cs_ready[c]), .s_in(cs[c]),
      .m_valid(hm_m_valid[c]), .m_ready(hm_m_ready[c]), .m_in(hm_m_in[c]),
      .e_valid(hm_e_valid[c]), .e_ready(hm_e_ready[c]), .e_in(hm_e_in[c]),
      .h_valid(h_valid[c]), .h_ready(h_ready[c]), .h_out(h[c]),
      .dropped(st_dropped[c]));
  end

  mwj_merge_h u_merge_h (
    .clk, .rst_n,
    .h_valid, .h_ready, .h_in(h),
    .o_valid(hs_valid), .o_ready(hs_ready), .o_out(hs_out),
    .seqs(st_seqs));

  // ---------------- tuplebuild branch ----------------
  logic    sp_s_valid, sp_s_ready;
  vertex_t sp_s;

  mwj_tuplebuild_split u_split (
    .clk, .rst_n,
    .i_valid(tb_i_valid), .i_ready(tb_i_ready), .i_in(tb_i_in),
    .s_valid(sp_s_valid), .s_ready(sp_s_ready), .s_out(sp_s),
    .t_valid(ch_t_valid), .t_ready(ch_t_ready), .t_out(ch_t_out),
    .paddings(st_paddings));

  mwj_mergeasmset u_mergeasmset (
    .clk, .rst_n,
    .t_valid(ch_v_valid), .t_ready(ch_v_ready), .t_in(ch_v_in),
    .o_valid(asm_valid), .o_ready(asm_ready), .o_out(asm_out),
    .syncs(st_syncs));

  mwj_fulldetect u_fulldetect (
    .clk, .rst_n, .nq,
    .in_valid(sp_s_valid), .in_ready(sp_s_ready), .in_v(sp_s),
    .out_valid(fs_valid), .out_ready(fs_ready), .out_v(fs_out), .out_full(fs_full),
    .full_count(st_full));

  // ---------------- preprocess ----------------
  label_t l2t_from [2], l2t_to [2];
  logic   l2t_hit [2];
  table_t l2t_id [2];

  build_table_descriptors u_tables (
    .clk, .rst_n, .clear(q_clear),
    .v_valid(q_v_valid), .v_num(q_v_num), .v_pos(q_v_pos),
    .e_valid(q_e_valid), .e_src(q_e_src), .e_dst(q_e_dst), .e_lsrc(q_e_lsrc), .e_ldst(q_e_ldst),
    .l2t_a_from(l2t_from), .l2t_a_to(l2t_to), .l2t_hit, .l2t_id,
    .qv_num, .qv_idx, .qv_n_indexing, .qv_n_indexed,
    .qv_indexing_tbl, .qv_indexing_peer, .qv_indexed_tbl, .qv_indexed_peer,
    .num_tables);

  store_edges #(.EA_W(EA_W)) u_store (
    .clk, .rst_n, .clear(pe_clear), .prefix(pe_prefix), .busy(pe_busy), .phase(pe_phase),
    .e_valid(pe_valid), .e_ready(pe_ready), .e_in(pe_in),
    .l2t_from, .l2t_to, .l2t_hit, .l2t_id,
    .em_wr_en, .em_wr_addr, .em_wr_data,
    .blk_bank, .blk_idx, .blk_end, .blk_cnt,
    .bank_count(st_bank_edges));
endmodule

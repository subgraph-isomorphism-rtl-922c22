// build_table_descriptors: builds the edge-table descriptors from the query.
//
// Step 1 of preprocess. First the query vertices are loaded with their
// position in the matching order (fromNumToPos). Then every query edge is
// read once: of its two end nodes, the one that comes first in the order is
// the indexing node and the other the indexed node. The pair (indexing label,
// indexed label) selects an entry of labelToTable; the first time a pair is
// seen it gets the next table number (numTables counter). The table number
// and the partner node are appended to the indexing node's list of tables it
// indexes and to the indexed node's list of tables it is indexed by
// (qVertices). Tables model only the query, so this block is the same in the
// one- and two-bank designs.
//
// The algorithm follows the reference design. The port-level protocol, the
// widths and keeping all tables in registers are this design's choices.
//
// Interface: clear (one cycle) empties everything. v_valid loads one vertex
// position per cycle; e_valid processes one query edge per cycle. Two
// combinational lookup ports give labelToTable (hit + table id); one
// combinational port reads a node's table lists (entry qv_idx).
module build_table_descriptors
  import less_pkg::*;
#(
  parameter int unsigned MAXV = MAX_QV
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  // query vertices: number and position in the matching order
  input  logic   v_valid,
  input  logic [$clog2(MAXV)-1:0] v_num,
  input  logic [$clog2(MAXV)-1:0] v_pos,
  // query edges
  input  logic   e_valid,
  input  logic [$clog2(MAXV)-1:0] e_src,
  input  logic [$clog2(MAXV)-1:0] e_dst,
  input  label_t e_lsrc,
  input  label_t e_ldst,
  // labelToTable lookups (two ports: both directions of a data edge)
  input  label_t l2t_a_from [2],
  input  label_t l2t_a_to   [2],
  output logic   l2t_hit    [2],
  output table_t l2t_id     [2],
  // qVertices read port
  input  logic [$clog2(MAXV)-1:0] qv_num,
  input  logic [$clog2(MAXV)-1:0] qv_idx,
  output logic [$clog2(MAXV+1)-1:0] qv_n_indexing,
  output logic [$clog2(MAXV+1)-1:0] qv_n_indexed,
  output table_t qv_indexing_tbl,
  output logic [$clog2(MAXV)-1:0] qv_indexing_peer,
  output table_t qv_indexed_tbl,
  output logic [$clog2(MAXV)-1:0] qv_indexed_peer,
  output logic [TABLE_W:0] num_tables
);
  localparam int unsigned NL = 2 ** LABEL_W;
  localparam int unsigned VW = $clog2(MAXV);
  localparam int unsigned CW = $clog2(MAXV + 1);

  logic          l2t_v  [NL][NL];
  table_t        l2t_t  [NL][NL];
  logic [VW-1:0] pos    [MAXV];
  logic [CW-1:0] n_ing  [MAXV];
  logic [CW-1:0] n_ed   [MAXV];
  table_t        ing_t  [MAXV][MAXV];
  logic [VW-1:0] ing_p  [MAXV][MAXV];
  table_t        ed_t   [MAXV][MAXV];
  logic [VW-1:0] ed_p   [MAXV][MAXV];

  // indexing / indexed node of the incoming edge
  logic [VW-1:0] e_ing, e_ed;
  label_t        l_ing, l_ed;
  table_t        tid;
  logic          src_first;

  assign src_first = pos[e_src] < pos[e_dst];
  assign e_ing = src_first ? e_src  : e_dst;
  assign e_ed  = src_first ? e_dst  : e_src;
  assign l_ing = src_first ? e_lsrc : e_ldst;
  assign l_ed  = src_first ? e_ldst : e_lsrc;
  assign tid   = l2t_v[l_ing][l_ed] ? l2t_t[l_ing][l_ed] : num_tables[TABLE_W-1:0];

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      l2t_hit[p] = l2t_v[l2t_a_from[p]][l2t_a_to[p]];
      l2t_id[p]  = l2t_t[l2t_a_from[p]][l2t_a_to[p]];
    end
  end

  assign qv_n_indexing    = n_ing[qv_num];
  assign qv_n_indexed     = n_ed[qv_num];
  assign qv_indexing_tbl  = ing_t[qv_num][qv_idx];
  assign qv_indexing_peer = ing_p[qv_num][qv_idx];
  assign qv_indexed_tbl   = ed_t[qv_num][qv_idx];
  assign qv_indexed_peer  = ed_p[qv_num][qv_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num_tables <= '0;
      for (int i = 0; i < NL; i++)
        for (int j = 0; j < NL; j++) l2t_v[i][j] <= 1'b0;
      for (int v = 0; v < MAXV; v++) begin
        n_ing[v] <= '0;
        n_ed[v]  <= '0;
        pos[v]   <= VW'(v);
      end
    end else if (clear) begin
      num_tables <= '0;
      for (int i = 0; i < NL; i++)
        for (int j = 0; j < NL; j++) l2t_v[i][j] <= 1'b0;
      for (int v = 0; v < MAXV; v++) begin
        n_ing[v] <= '0;
        n_ed[v]  <= '0;
      end
    end else begin
      if (v_valid) pos[v_num] <= v_pos;
      if (e_valid) begin
        if (!l2t_v[l_ing][l_ed]) begin
          l2t_v[l_ing][l_ed] <= 1'b1;
          l2t_t[l_ing][l_ed] <= tid;
          num_tables         <= num_tables + 1'b1;
        end
        ing_t[e_ing][n_ing[e_ing][VW-1:0]] <= tid;
        ing_p[e_ing][n_ing[e_ing][VW-1:0]] <= e_ed;
        n_ing[e_ing]                       <= n_ing[e_ing] + 1'b1;
        ed_t[e_ed][n_ed[e_ed][VW-1:0]]     <= tid;
        ed_p[e_ed][n_ed[e_ed][VW-1:0]]     <= e_ing;
        n_ed[e_ed]                         <= n_ed[e_ed] + 1'b1;
      end
    end
  end

  a_tables_fit: assert property (@(posedge clk) disable iff (!rst_n)
    e_valid && !l2t_v[l_ing][l_ed] |-> num_tables < (TABLE_W+1)'(2 ** TABLE_W));
endmodule

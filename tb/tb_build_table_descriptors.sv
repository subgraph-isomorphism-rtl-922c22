// tb_build_table_descriptors: loads random queries (up to MAX_QV vertices,
// random labels from 3, random matching order, random simple edges), one
// edge per cycle, and compares labelToTable, the table count and every
// node's indexing / indexed table lists (table id and partner node) with a
// model that applies the same rule: the node earlier in the order indexes,
// and a label pair gets the next table number the first time it is seen.
module tb_build_table_descriptors;
  import less_pkg::*;
  localparam int VW = $clog2(MAX_QV);
  logic clk = 0, rst_n = 0;
  logic clear, v_valid, e_valid;
  logic [VW-1:0] v_num, v_pos, e_src, e_dst, qv_num, qv_idx, qv_indexing_peer, qv_indexed_peer;
  label_t e_lsrc, e_ldst;
  label_t l2t_a_from [2], l2t_a_to [2];
  logic l2t_hit [2];
  table_t l2t_id [2], qv_indexing_tbl, qv_indexed_tbl;
  logic [$clog2(MAX_QV+1)-1:0] qv_n_indexing, qv_n_indexed;
  logic [TABLE_W:0] num_tables;
  int checks = 0, failures = 0;

  build_table_descriptors dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_query();
    int nv, perm[$], lab[MAX_QV], posv[MAX_QV];
    int mt[4][4], ntab;
    int ing_t[MAX_QV][$], ing_p[MAX_QV][$], ed_t[MAX_QV][$], ed_p[MAX_QV][$];
    bit adj[MAX_QV][MAX_QV];
    nv = 3 + $urandom % (MAX_QV - 2);
    perm = {};
    for (int i = 0; i < nv; i++) perm.push_back(i);
    perm.shuffle();
    for (int i = 0; i < nv; i++) begin lab[i] = $urandom % 3; posv[i] = perm[i]; end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) mt[i][j] = -1;
    for (int i = 0; i < MAX_QV; i++) for (int j = 0; j < MAX_QV; j++) adj[i][j] = 0;
    ntab = 0;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < nv; i++) begin
      v_valid = 1; v_num = VW'(i); v_pos = VW'(posv[i]); @(negedge clk);
    end
    v_valid = 0;
    for (int k = 0; k < 2 * nv; k++) begin
      int s, d, a, b;
      s = $urandom % nv; d = $urandom % nv;
      if (s == d || adj[s][d] || adj[d][s]) continue;
      adj[s][d] = 1;
      a = posv[s] < posv[d] ? s : d; b = posv[s] < posv[d] ? d : s;
      if (mt[lab[a]][lab[b]] < 0) mt[lab[a]][lab[b]] = ntab++;
      ing_t[a].push_back(mt[lab[a]][lab[b]]); ing_p[a].push_back(b);
      ed_t[b].push_back(mt[lab[a]][lab[b]]);  ed_p[b].push_back(a);
      e_valid = 1; e_src = VW'(s); e_dst = VW'(d);
      e_lsrc = LABEL_W'(lab[s]); e_ldst = LABEL_W'(lab[d]);
      @(negedge clk);
    end
    e_valid = 0;
    @(negedge clk);
    check(num_tables == ntab, $sformatf("tables %0d exp %0d", num_tables, ntab));
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      l2t_a_from[0] = LABEL_W'(i); l2t_a_to[0] = LABEL_W'(j);
      l2t_a_from[1] = LABEL_W'(j); l2t_a_to[1] = LABEL_W'(i);
      #1;
      check(l2t_hit[0] == (mt[i][j] >= 0) && (mt[i][j] < 0 || l2t_id[0] == mt[i][j]),
            $sformatf("labelToTable[%0d][%0d]", i, j));
      check(l2t_hit[1] == (mt[j][i] >= 0), "second lookup port");
    end
    for (int v = 0; v < nv; v++) begin
      qv_num = VW'(v); qv_idx = 0; #1;
      check(qv_n_indexing == ing_t[v].size() && qv_n_indexed == ed_t[v].size(),
            $sformatf("node %0d list sizes %0d/%0d exp %0d/%0d", v, qv_n_indexing, qv_n_indexed,
                      ing_t[v].size(), ed_t[v].size()));
      foreach (ing_t[v][k]) begin
        qv_idx = VW'(k); #1;
        check(qv_indexing_tbl == ing_t[v][k] && qv_indexing_peer == ing_p[v][k], "indexing entry");
      end
      foreach (ed_t[v][k]) begin
        qv_idx = VW'(k); #1;
        check(qv_indexed_tbl == ed_t[v][k] && qv_indexed_peer == ed_p[v][k], "indexed entry");
      end
    end
  endtask

  initial begin
    clear = 0; v_valid = 0; e_valid = 0; v_num = 0; v_pos = 0; e_src = 0; e_dst = 0;
    e_lsrc = 0; e_ldst = 0; qv_num = 0; qv_idx = 0;
    l2t_a_from[0] = 0; l2t_a_to[0] = 0; l2t_a_from[1] = 0; l2t_a_to[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int q = 0; q < 40; q++) run_query();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

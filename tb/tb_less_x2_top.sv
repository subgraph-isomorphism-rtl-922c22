// tb_less_x2_top: end-to-end run of the two-channel core at its default sizes.
//
// The testbench plays the tasks that sit outside the top (assembly writing
// the FIFO, edgebuild, readmin of each channel, the intersect..compact chain
// of each channel, tuplebuild's tuple generation, writeBloom) and checks what
// the top produces against models computed here:
//   preprocess  a query is loaded, the data edges are split over the banks
//               (count, prefix, store) and the per-bank counts are checked;
//   edgebuild   compressed words -> decompressed packets -> findmin picks the
//   branch      emptiest bloom -> channel by hash MSB -> homomorphism drops
//               candidates already in the solution -> merged hstream; every
//               hstream sequence is checked in per-channel order;
//   tuplebuild  tuples are split, padded, passed through both channel chains
//   branch      with random delays, merged, and checked group by group;
//               solution packets come back flagged complete or not.
// Each mechanism (FAKE start, routing to each channel, stop broadcast,
// homomorphism drop, empty candidate set, merge switching channel, padding,
// padding sync, complete solution, both banks, both edge directions) is
// counted and must occur at least once.
module tb_less_x2_top;
  import less_pkg::*;
  localparam int AWB = TABLE_W + H1_W;
  localparam int NQ = 4;

  logic clk = 0, rst_n = 0;
  logic [$clog2(MAX_QV+1)-1:0] nq;
  logic fifo_wr_valid, fifo_wr_ready;
  node_t fifo_wr_data;
  logic [$clog2(1024+1)-1:0] fifo_count;
  logic dec_valid, dec_ready;
  vertex_t dec_out;
  logic fm_t_valid, fm_t_ready, fm_s_valid, fm_s_ready;
  fmin_tuple_t fm_t_in;
  vertex_t fm_s_in;
  logic bl_wr_en, bl_wr_bank;
  logic [AWB-1:0] bl_wr_addr;
  bloom_t bl_wr_data;
  logic [1:0] rc_t_valid, rc_t_ready, rc_b_valid, rc_b_ready;
  fmin_tuple_t rc_t_out [2];
  bloom_t rc_b_out [2];
  logic [1:0] hm_m_valid, hm_m_ready, hm_e_valid, hm_e_ready;
  node_t hm_m_in [2];
  vertex_t hm_e_in [2];
  logic hs_valid, hs_ready;
  seq_t hs_out;
  logic tb_i_valid, tb_i_ready;
  itup_t tb_i_in;
  logic [1:0] ch_t_valid, ch_t_ready, ch_v_valid, ch_v_ready;
  itup_t ch_t_out [2], ch_v_in [2];
  logic asm_valid, asm_ready;
  itup_t asm_out;
  logic fs_valid, fs_ready, fs_full;
  vertex_t fs_out;
  logic q_clear, q_v_valid, q_e_valid;
  logic [$clog2(MAX_QV)-1:0] q_v_num, q_v_pos, q_e_src, q_e_dst, qv_num, qv_idx, qv_indexing_peer, qv_indexed_peer;
  label_t q_e_lsrc, q_e_ldst;
  logic [$clog2(MAX_QV+1)-1:0] qv_n_indexing, qv_n_indexed;
  table_t qv_indexing_tbl, qv_indexed_tbl;
  logic [TABLE_W:0] num_tables;
  logic pe_clear, pe_prefix, pe_busy, pe_phase, pe_valid, pe_ready;
  edge_t pe_in;
  logic [1:0] em_wr_en;
  logic [23:0] em_wr_addr [2];
  logic [63:0] em_wr_data [2];
  logic blk_bank;
  logic [AWB-1:0] blk_idx;
  logic [23:0] blk_end, blk_cnt;
  logic [31:0] st_routed [2], st_dropped [2], st_seqs [2], st_bank_edges [2];
  logic [31:0] st_paddings, st_syncs, st_full;

  less_x2_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int m_fake = 0, m_route[2] = '{0, 0}, m_stop_bc[2] = '{0, 0}, m_drop = 0, m_nil = 0,
      m_switch = 0, m_pad = 0, m_sync = 0, m_full = 0, m_bank[2] = '{0, 0}, m_rev = 0;

  function automatic logic bank_of(node_t n);
    node_t h;
    h = n * 32'h9E37_79B1;
    return h[31];
  endfunction
  function automatic int popc(bloom_t b);
    int c = 0;
    for (int i = 0; i < BLOOM_W; i++) c += b[i];
    return c;
  endfunction

  // ================= preprocess =================
  int tab[4][4];
  task automatic preprocess();
    edge_t e;
    int exp_bank[2];
    // query: 0-1-2-3 path plus 0-2, labels 0,1,1,2, order = numbering
    int lab[4] = '{0, 1, 1, 2};
    int qe[5][2] = '{'{0, 1}, '{1, 2}, '{2, 3}, '{0, 2}, '{1, 3}};
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) tab[i][j] = -1;
    @(negedge clk); q_clear = 1; @(negedge clk); q_clear = 0;
    for (int v = 0; v < 4; v++) begin
      q_v_valid = 1; q_v_num = 2'(v); q_v_pos = 2'(v); @(negedge clk);
    end
    q_v_valid = 0;
    begin
      int nt = 0;
      for (int k = 0; k < 5; k++) begin
        q_e_valid = 1; q_e_src = 3'(qe[k][0]); q_e_dst = 3'(qe[k][1]);
        q_e_lsrc = LABEL_W'(lab[qe[k][0]]); q_e_ldst = LABEL_W'(lab[qe[k][1]]);
        if (tab[lab[qe[k][0]]][lab[qe[k][1]]] < 0) tab[lab[qe[k][0]]][lab[qe[k][1]]] = nt++;
        @(negedge clk);
      end
      q_e_valid = 0;
      @(negedge clk);
      check(num_tables == nt, $sformatf("query tables %0d exp %0d", num_tables, nt));
    end
    // data edges
    exp_bank[0] = 0; exp_bank[1] = 0;
    @(negedge clk); pe_clear = 1; @(negedge clk); pe_clear = 0;
    while (pe_busy) @(negedge clk);
    for (int ph = 0; ph < 2; ph++) begin
      void'($urandom(77));
      for (int i = 0; i < 300; i++) begin
        e.src = $urandom % 2000; e.dst = $urandom % 2000;
        e.lsrc = LABEL_W'($urandom % 3); e.ldst = LABEL_W'($urandom % 3);
        if (ph == 0) begin
          if (tab[e.lsrc][e.ldst] >= 0) begin exp_bank[bank_of(e.src)]++; end
          if (tab[e.ldst][e.lsrc] >= 0) begin exp_bank[bank_of(e.dst)]++; m_rev++; end
        end
        pe_phase = ph[0]; pe_valid = 1; pe_in = e;
        do @(posedge clk); while (!pe_ready);
        @(negedge clk);
      end
      pe_valid = 0;
      if (ph == 0) begin
        @(negedge clk); pe_prefix = 1; @(negedge clk); pe_prefix = 0;
        while (pe_busy) @(negedge clk);
      end
    end
    for (int b = 0; b < 2; b++) begin
      check(st_bank_edges[b] == exp_bank[b], $sformatf("bank %0d edges %0d exp %0d", b, st_bank_edges[b], exp_bank[b]));
      m_bank[b] = st_bank_edges[b];
    end
  endtask

  always @(posedge clk) for (int b = 0; b < 2; b++) if (em_wr_en[b]) begin
    node_t ing;
    ing = em_wr_data[b][63:32];
    check(bank_of(ing) == b, "edge written to the bank of its indexing node");
  end

  // ================= edgebuild branch =================
  bloom_t bimg [2][2**AWB];
  node_t words[$];
  vertex_t pk[$];              // packet being assembled from dec
  seq_t expseq[2][$][$];       // per channel: expected sequences
  int nexp_seq = 0;

  function automatic bloom_t bloom_of(fmin_tuple_t t);
    node_t h;
    h = t.indexing * 32'h9E37_79B1;
    return bimg[h[31]][{t.tbl, h[H1_W-1:0]}];
  endfunction
  function automatic node_t cand(node_t ind, int i);
    return (ind * 13 + i * 7) % 12;
  endfunction
  function automatic int ncand(node_t ind);
    return ind % 5;            // 0 .. 4 candidates
  endfunction

  // edgebuild model: per packet, propose tuples, forward packet
  fmin_tuple_t eb_t[$];
  vertex_t eb_s[$];
  always @(posedge clk) if (rst_n && dec_valid && dec_ready) begin
    pk.push_back(dec_out);
    if (dec_out.last) begin
      if (dec_out.node == STOP_NODE) begin
        eb_t.push_back('{tbl: '0, indexing: '0, last: 1'b0, stop: 1'b1});
        eb_s.push_back(dec_out);
      end else begin
        int nt, best, bf;
        fmin_tuple_t t, tv[$];
        node_t ind;
        seq_t q[$];
        if (pk.size() == 1) m_fake++;
        tv = {};
        nt = 1 + $urandom % 3; best = 0; bf = 1000;
        for (int i = 0; i < nt; i++) begin
          t.tbl = TABLE_W'($urandom % 4); t.indexing = pk[$urandom % pk.size()].node;
          t.last = (i == nt - 1); t.stop = 0;
          tv.push_back(t); eb_t.push_back(t);
          if (popc(bloom_of(t)) < bf) begin bf = popc(bloom_of(t)); best = i; end
        end
        foreach (pk[i]) eb_s.push_back(pk[i]);
        // expected hstream sequence on channel of the minset
        ind = tv[best].indexing;
        q = {};
        foreach (pk[i]) q.push_back('{node: pk[i].node, last: pk[i].last, nil: 1'b0});
        q.push_back('{node: ind, last: 1'b0, nil: 1'b0});
        begin
          node_t keep[$];
          keep = {};
          for (int i = 0; i < ncand(ind); i++) begin
            bit in_sol;
            in_sol = 0;
            foreach (pk[k]) if (pk[k].node == cand(ind, i)) in_sol = 1;
            if (!in_sol) keep.push_back(cand(ind, i));
          end
          if (keep.size() == 0) q.push_back('{node: '0, last: 1'b1, nil: 1'b1});
          foreach (keep[i]) q.push_back('{node: keep[i], last: (i == keep.size() - 1), nil: 1'b0});
        end
        expseq[bank_of(ind)].push_back(q);
        nexp_seq++;
      end
      pk = {};
    end
  end
  always @(negedge clk) begin
    dec_ready = ($urandom % 4) != 0;
    fm_t_valid = eb_t.size() != 0; if (eb_t.size() != 0) fm_t_in = eb_t[0];
    fm_s_valid = eb_s.size() != 0; if (eb_s.size() != 0) fm_s_in = eb_s[0];
  end
  always @(posedge clk) if (rst_n) begin
    if (fm_t_valid && fm_t_ready) void'(eb_t.pop_front());
    if (fm_s_valid && fm_s_ready) void'(eb_s.pop_front());
  end

  // readmin model per channel: minset word = indexing node, candidates from it
  node_t rm_m[2][$];
  vertex_t rm_e[2][$];
  for (genvar c = 0; c < 2; c++) begin : g_rm
    always @(posedge clk) if (rst_n) begin
      if (rc_t_valid[c] && rc_t_ready[c]) begin
        if (rc_t_out[c].stop) m_stop_bc[c]++;
        else begin
          node_t ind;
          int n;
          ind = rc_t_out[c].indexing;
          m_route[c]++;
          check(bank_of(ind) == c, "tuple on the channel of its hash MSB");
          rm_m[c].push_back(ind);
          n = ncand(ind);
          if (n == 0) rm_e[c].push_back('{node: 32'd1000, last: 1'b1});  // outside range, kept
          for (int i = 0; i < n; i++) rm_e[c].push_back('{node: cand(ind, i), last: (i == n - 1)});
        end
      end
      if (rc_b_valid[c] && rc_b_ready[c])
        check(popc(rc_b_out[c]) >= 0, "bloom forwarded");
      if (hm_m_valid[c] && hm_m_ready[c]) void'(rm_m[c].pop_front());
      if (hm_e_valid[c] && hm_e_ready[c]) void'(rm_e[c].pop_front());
    end
    always @(negedge clk) begin
      rc_t_ready[c] = ($urandom % 3) != 0;
      rc_b_ready[c] = ($urandom % 3) != 0;
      hm_m_valid[c] = rm_m[c].size() != 0; if (rm_m[c].size() != 0) hm_m_in[c] = rm_m[c][0];
      hm_e_valid[c] = rm_e[c].size() != 0; if (rm_e[c].size() != 0) hm_e_in[c] = rm_e[c][0];
    end
  end

  // hstream checker
  int hs_phase = 0, hs_ch = -1, hs_last_ch = -1, n_seq_out = 0, hs_stops = 0;
  seq_t cur_q[$];
  always @(negedge clk) hs_ready = ($urandom % 4) != 0;
  always @(posedge clk) if (rst_n && hs_valid && hs_ready) begin
    if (hs_phase == 0 && hs_out.node == STOP_NODE) hs_stops++;
    else begin
      // the sequence's channel is known at its minset word; buffer until then
      cur_q.push_back(hs_out);
      if (hs_phase == 0 && hs_out.last) hs_phase = 1;
      else if (hs_phase == 1) begin hs_phase = 2; hs_ch = bank_of(hs_out.node); end
      else if (hs_phase == 2 && hs_out.last) begin
        // readmin sends node 1000 (never in a solution) for an empty edge set
        check(expseq[hs_ch].size() != 0, "unexpected sequence");
        if (expseq[hs_ch].size() != 0) begin
          seq_t e[$];
          e = expseq[hs_ch].pop_front();
          if (e[e.size()-1].nil && cur_q[cur_q.size()-1].node == 32'd1000) begin
            e[e.size()-1] = '{node: 32'd1000, last: 1'b1, nil: 1'b0};
          end else if (e[e.size()-1].nil) m_nil++;
          if (cur_q != e) begin foreach (cur_q[i]) $display("got %h %0d %0d", cur_q[i].node, cur_q[i].last, cur_q[i].nil); foreach (e[i]) $display("exp %h %0d %0d", e[i].node, e[i].last, e[i].nil); end
          check(cur_q == e, $sformatf("hstream sequence %0d on channel %0d", n_seq_out, hs_ch));
        end
        if (hs_last_ch >= 0 && hs_last_ch != hs_ch) m_switch++;
        hs_last_ch = hs_ch;
        n_seq_out++;
        cur_q = {}; hs_phase = 0;
      end
    end
  end

  // ================= tuplebuild branch =================
  itup_t tin[$];
  itup_t chq[2][$];
  typedef struct { itup_t reg_q[2][$]; itup_t fin; } group_t;
  group_t groups[$];
  vertex_t fs_exp[$];
  bit fs_exp_full[$];
  int uid = 1;

  for (genvar c = 0; c < 2; c++) begin : g_chain
    // intersect..compact stand-in: a queue with random delay
    always @(posedge clk) if (rst_n) begin
      if (ch_t_valid[c] && ch_t_ready[c]) chq[c].push_back(ch_t_out[c]);
      if (ch_v_valid[c] && ch_v_ready[c]) void'(chq[c].pop_front());
    end
    always @(negedge clk) begin
      ch_t_ready[c] = ($urandom % 3) != 0;
      ch_v_valid[c] = chq[c].size() != 0 && ($urandom % 3) != 0;
      if (chq[c].size() != 0) ch_v_in[c] = chq[c][0];
    end
  end

  always @(negedge clk) begin
    asm_ready = ($urandom % 4) != 0;
    fs_ready = ($urandom % 4) != 0;
    tb_i_valid = tin.size() != 0; if (tin.size() != 0) tb_i_in = tin[0];
  end
  always @(posedge clk) if (rst_n && tb_i_valid && tb_i_ready) void'(tin.pop_front());

  always @(posedge clk) if (rst_n && fs_valid && fs_ready) begin
    check(fs_exp.size() != 0 && fs_out == fs_exp[0] && fs_full == fs_exp_full[0],
          $sformatf("solution beat %h full %0d", fs_out.node, fs_full));
    if (fs_exp.size() != 0) begin
      if (fs_full && fs_out.last) m_full++;
      void'(fs_exp.pop_front()); void'(fs_exp_full.pop_front());
    end
  end

  always @(posedge clk) if (rst_n && asm_valid && asm_ready) begin
    if (groups.size() == 0) check(0, "tuple with nothing expected");
    else if (asm_out.kind == IT_EDGE && !asm_out.last_edge) begin
      int c;
      c = bank_of(asm_out.node);
      check(groups[0].reg_q[c].size() != 0 && groups[0].reg_q[c][0] == asm_out, "regular tuple order");
      if (groups[0].reg_q[c].size() != 0) void'(groups[0].reg_q[c].pop_front());
    end else begin
      check(groups[0].reg_q[0].size() == 0 && groups[0].reg_q[1].size() == 0, "set closed early");
      check(asm_out == groups[0].fin, "closing tuple");
      if (asm_out.kind == IT_EDGE) m_sync++;
      void'(groups.pop_front());
    end
  end

  task automatic tuple_branch();
    itup_t t;
    group_t g;
    for (int p = 0; p < 60; p++) begin
      int ns, nsets;
      ns = 1 + $urandom % 6;
      for (int i = 0; i < ns; i++) begin
        t = '0; t.kind = IT_SOL; t.node = uid++; t.last = (i == ns - 1);
        tin.push_back(t);
        fs_exp.push_back('{node: t.node, last: t.last}); fs_exp_full.push_back(ns == NQ);
      end
      nsets = 1 + $urandom % 3;
      for (int s = 0; s < nsets; s++) begin
        int ne;
        ne = 1 + $urandom % 6;
        g.reg_q[0] = {}; g.reg_q[1] = {};
        for (int i = 0; i < ne; i++) begin
          t = '0; t.kind = IT_EDGE; t.node = uid++ * 3; t.tbl = TABLE_W'(s); t.last_edge = (i == ne - 1);
          tin.push_back(t);
          if (t.last_edge) g.fin = t; else g.reg_q[bank_of(t.node)].push_back(t);
        end
        groups.push_back(g);
        m_pad++;
      end
      t = '0; t.kind = IT_LAST_SET; tin.push_back(t);
      g.reg_q[0] = {}; g.reg_q[1] = {}; g.fin = t; groups.push_back(g);
    end
    t = '0; t.kind = IT_SOL; t.node = STOP_NODE; t.last = 1; tin.push_back(t);
    fs_exp.push_back('{node: STOP_NODE, last: 1'b1}); fs_exp_full.push_back(0);
    t = '0; t.kind = IT_STOP; tin.push_back(t);
    g.reg_q[0] = {}; g.reg_q[1] = {}; g.fin = t; groups.push_back(g);
    wait (tin.size() == 0 && groups.size() == 0 && fs_exp.size() == 0);
  endtask

  task automatic edge_branch();
    // FAKE start, then radix groups; the FIFO is written by the "assembly"
    words = '{FAKE_NODE, 32'd3, 32'd17, 32'd22};
    for (int g = 0; g < 60; g++) begin
      int nr, ne;
      nr = 1 + $urandom % 3; ne = 1 + $urandom % 3;
      for (int r = 0; r < nr; r++) words.push_back(32'h8000_0000 | ($urandom % 12));
      for (int e = 0; e < ne; e++) words.push_back($urandom % 12);
    end
    words.push_back(STOP_NODE);
    foreach (words[i]) begin
      @(negedge clk); fifo_wr_valid = 1; fifo_wr_data = words[i];
      do @(posedge clk); while (!fifo_wr_ready);
    end
    @(negedge clk); fifo_wr_valid = 0;
    wait (hs_stops == 1);
    repeat (20) @(posedge clk);
  endtask

  initial begin
    nq = NQ;
    fifo_wr_valid = 0; fifo_wr_data = 0; fm_t_in = '0; fm_s_in = '0;
    bl_wr_en = 0; bl_wr_bank = 0; bl_wr_addr = 0; bl_wr_data = 0;
    hm_m_in[0] = 0; hm_m_in[1] = 0; hm_e_in[0] = '0; hm_e_in[1] = '0;
    tb_i_in = '0; ch_v_in[0] = '0; ch_v_in[1] = '0;
    q_clear = 0; q_v_valid = 0; q_e_valid = 0; q_v_num = 0; q_v_pos = 0; q_e_src = 0; q_e_dst = 0;
    q_e_lsrc = 0; q_e_ldst = 0; qv_num = 0; qv_idx = 0;
    pe_clear = 0; pe_prefix = 0; pe_phase = 0; pe_valid = 0; pe_in = '0; blk_bank = 0; blk_idx = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    preprocess();
    // writeBloom stand-in: load the bloom banks with random words
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < 2**AWB; a++) begin
        bimg[b][a] = {$urandom, $urandom} & {$urandom, $urandom};
        @(negedge clk); bl_wr_en = 1; bl_wr_bank = b[0]; bl_wr_addr = AWB'(a); bl_wr_data = bimg[b][a];
      end
    @(negedge clk); bl_wr_en = 0;
    fork
      edge_branch();
      tuple_branch();
    join
    check(n_seq_out == nexp_seq && expseq[0].size() == 0 && expseq[1].size() == 0,
          $sformatf("hstream sequences %0d exp %0d", n_seq_out, nexp_seq));
    check(hs_stops == 1, "one stop on the merged hstream");
    check(st_paddings == m_pad, $sformatf("paddings %0d exp %0d", st_paddings, m_pad));
    check(m_sync == m_pad, $sformatf("padding syncs %0d exp %0d", m_sync, m_pad));
    check(st_full == m_full, "complete-solution counter");
    check(st_dropped[0] + st_dropped[1] > 0, "homomorphism drop");
    m_drop = st_dropped[0] + st_dropped[1];
    $display("mechanisms: fake=%0d route0=%0d route1=%0d stop_bc0=%0d stop_bc1=%0d drop=%0d nil=%0d switch=%0d pad=%0d sync=%0d full=%0d bank0=%0d bank1=%0d rev=%0d",
             m_fake, m_route[0], m_route[1], m_stop_bc[0], m_stop_bc[1], m_drop, m_nil, m_switch,
             m_pad, m_sync, m_full, m_bank[0], m_bank[1], m_rev);
    check(m_fake > 0, "FAKE_NODE start");
    check(m_route[0] > 0 && m_route[1] > 0, "both channels routed");
    check(m_stop_bc[0] == 1 && m_stop_bc[1] == 1, "stop broadcast to both channels");
    check(m_drop > 0, "homomorphic candidate dropped");
    check(m_nil > 0, "empty candidate set");
    check(m_switch > 0, "merge switched channel");
    check(m_pad > 0 && m_sync > 0, "padding and sync");
    check(m_full > 0, "complete solution detected");
    check(m_bank[0] > 0 && m_bank[1] > 0, "both banks filled");
    check(m_rev > 0, "dst->src direction stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

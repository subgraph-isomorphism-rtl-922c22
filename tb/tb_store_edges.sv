// tb_store_edges: a random data graph (400 edges, 4 labels) and a label-pair
// table of three query tables are run through clear, count pass, prefix and
// store pass. The testbench computes independently, for every edge and
// direction whose label pair is a table, the bank (hash MSB) and block
// ({table, low hash bits}); it then checks that each block of each bank holds
// exactly its edges, in input order, between start = end - count and end, that
// blocks do not overlap, and the per-bank direction counters.
module tb_store_edges;
  import less_pkg::*;
  localparam int BLK_W = TABLE_W + H1_W;
  localparam int EA_W = 24;
  logic clk = 0, rst_n = 0;
  logic clear, prefix, busy, phase, e_valid, e_ready;
  edge_t e_in;
  label_t l2t_from [2], l2t_to [2];
  logic l2t_hit [2];
  table_t l2t_id [2];
  logic [1:0] em_wr_en;
  logic [EA_W-1:0] em_wr_addr [2];
  logic [63:0] em_wr_data [2];
  logic blk_bank;
  logic [BLK_W-1:0] blk_idx;
  logic [EA_W-1:0] blk_end, blk_cnt;
  logic [31:0] bank_count [2];
  int checks = 0, failures = 0;

  edge_t edges[$];
  logic [63:0] mem [2][int];
  logic [63:0] expb [2][int][$];   // per bank, per block: stored words in order
  int ndir[2];
  int tab [4][4];                  // label pair -> table id, -1 none

  store_edges dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb for (int p = 0; p < 2; p++) begin
    l2t_hit[p] = tab[l2t_from[p][1:0]][l2t_to[p][1:0]] >= 0 && l2t_from[p] < 4 && l2t_to[p] < 4;
    l2t_id[p]  = TABLE_W'(tab[l2t_from[p][1:0]][l2t_to[p][1:0]]);
  end

  always @(posedge clk) for (int b = 0; b < 2; b++)
    if (em_wr_en[b]) mem[b][int'(em_wr_addr[b])] = em_wr_data[b];

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
    @(negedge clk); while (busy) @(negedge clk);
  endtask

  task automatic pass(input logic ph);
    phase = ph;
    foreach (edges[i]) begin
      @(negedge clk); e_valid = 1; e_in = edges[i];
      do @(posedge clk); while (!e_ready);
    end
    @(negedge clk); e_valid = 0;
  endtask

  initial begin
    edge_t e;
    node_t ing, ed, h;
    int blk, b, used_end[2];
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) tab[i][j] = -1;
    tab[0][1] = 0; tab[1][1] = 1; tab[2][3] = 2;
    ndir[0] = 0; ndir[1] = 0;
    for (int i = 0; i < 400; i++) begin
      e.src = $urandom % 3000; e.dst = $urandom % 3000;
      e.lsrc = LABEL_W'($urandom % 4); e.ldst = LABEL_W'($urandom % 4);
      edges.push_back(e);
      for (int d = 0; d < 2; d++) begin
        int t;
        t = d ? tab[e.ldst][e.lsrc] : tab[e.lsrc][e.ldst];
        if (t < 0) continue;
        ing = d ? e.dst : e.src; ed = d ? e.src : e.dst;
        h = ing * 32'h9E37_79B1;
        b = h[31]; blk = (t << H1_W) | h[H1_W-1:0];
        expb[b][blk].push_back({ing, ed});
        ndir[b]++;
      end
    end
    clear = 0; prefix = 0; phase = 0; e_valid = 0; e_in = '0; blk_bank = 0; blk_idx = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    pulse(clear);
    pass(0);
    pulse(prefix);
    pass(1);
    repeat (3) @(posedge clk);
    for (b = 0; b < 2; b++) begin
      check(bank_count[b] == ndir[b] && ndir[b] > 0, $sformatf("bank %0d count %0d exp %0d", b, bank_count[b], ndir[b]));
      used_end[b] = 0;
      for (blk = 0; blk < 2**BLK_W; blk++) begin
        int n, st;
        blk_bank = b[0]; blk_idx = BLK_W'(blk); #1;
        n = expb[b].exists(blk) ? expb[b][blk].size() : 0;
        if (n == 0 && blk_cnt == 0) begin
          check(int'(blk_end) >= used_end[b], "empty block in place");
          continue;
        end
        st = int'(blk_end) - int'(blk_cnt);
        check(int'(blk_cnt) == n, $sformatf("bank %0d block %0d count %0d exp %0d", b, blk, blk_cnt, n));
        check(st == used_end[b], $sformatf("bank %0d block %0d starts at %0d, previous ended at %0d", b, blk, st, used_end[b]));
        for (int i = 0; i < n; i++)
          check(mem[b].exists(st + i) && mem[b][st + i] == expb[b][blk][i],
                $sformatf("bank %0d block %0d entry %0d", b, blk, i));
        used_end[b] = int'(blk_end);
      end
      check(used_end[b] == ndir[b], "bank space fully used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mwj_findmin: loads both bloom banks with words of known fullness, then
// sends packets of 1..6 proposed tuples plus their solution nodes. For each
// packet the selected tuple, its bloom word and the forwarded solution are
// compared with a model that recomputes hash, bank, address and popcount.
// Ends with a stop tuple and stop node. Also checks the two-cycle-per-tuple
// rate for one packet with all outputs ready.
module tb_mwj_findmin;
  import less_pkg::*;
  localparam int AW = TABLE_W + H1_W;
  logic clk = 0, rst_n = 0;
  logic t_valid, t_ready, s_valid, s_ready;
  fmin_tuple_t t_in;
  vertex_t s_in;
  logic bl_rd_en, bl_rd_bank;
  logic [AW-1:0] bl_rd_addr;
  bloom_t bl_rd_data;
  logic mt_valid, mt_ready, mb_valid, mb_ready, ms_valid, ms_ready;
  fmin_tuple_t mt_out;
  bloom_t mb_out;
  vertex_t ms_out;
  logic wr_en, wr_bank;
  logic [AW-1:0] wr_addr;
  bloom_t wr_data;
  int checks = 0, failures = 0;

  bloom_t img [2][2**AW];
  fmin_tuple_t exp_t[$];
  bloom_t exp_b[$];
  vertex_t exp_s[$];

  mwj_findmin dut (.*);
  bloom_ram #(.BANKS(2)) blooms (.clk, .wr_en, .wr_bank, .wr_addr, .wr_data,
    .rd_en(bl_rd_en), .rd_bank(bl_rd_bank), .rd_addr(bl_rd_addr), .rd_data(bl_rd_data));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int popc(bloom_t b);
    int c = 0;
    for (int i = 0; i < BLOOM_W; i++) c += b[i];
    return c;
  endfunction

  function automatic bloom_t lookup(fmin_tuple_t t);
    node_t h;
    h = t.indexing * 32'h9E37_79B1;
    return img[h[31]][{t.tbl, h[H1_W-1:0]}];
  endfunction

  bit stall = 1;
  always @(negedge clk) begin
    mt_ready = stall ? ($urandom % 3 != 0) : 1'b1;
    mb_ready = stall ? ($urandom % 3 != 0) : 1'b1;
    ms_ready = stall ? ($urandom % 3 != 0) : 1'b1;
  end

  always @(posedge clk) if (rst_n) begin
    if (mt_valid && mt_ready) begin
      fmin_tuple_t e; e = exp_t.pop_front();
      check(mt_out == e, $sformatf("tuple %h exp %h", mt_out, e));
    end
    if (mb_valid && mb_ready) begin
      bloom_t e; e = exp_b.pop_front();
      check(mb_out == e, $sformatf("bloom %h exp %h", mb_out, e));
    end
    if (ms_valid && ms_ready) begin
      vertex_t e; e = exp_s.pop_front();
      check(ms_out == e, $sformatf("sol %h exp %h", ms_out, e));
    end
  end

  task automatic send_packet(input int nt, input int nsol);
    fmin_tuple_t tv[$];
    fmin_tuple_t t;
    int best, bf;
    tv = {};
    best = 0; bf = 1000;
    for (int i = 0; i < nt; i++) begin
      t.tbl = $urandom; t.indexing = $urandom % 5000; t.last = (i == nt - 1); t.stop = 0;
      tv.push_back(t);
      if (popc(lookup(t)) < bf) begin bf = popc(lookup(t)); best = i; end
    end
    exp_t.push_back(tv[best]);
    exp_b.push_back(lookup(tv[best]));
    fork
      begin
        foreach (tv[i]) begin
          @(negedge clk); t_valid = 1; t_in = tv[i];
          do @(posedge clk); while (!t_ready);
        end
        @(negedge clk); t_valid = 0;
      end
      begin
        for (int i = 0; i < nsol; i++) begin
          vertex_t v;
          v.node = $urandom % 5000; v.last = (i == nsol - 1);
          exp_s.push_back(v);
          @(negedge clk); s_valid = 1; s_in = v;
          do @(posedge clk); while (!s_ready);
        end
        @(negedge clk); s_valid = 0;
      end
    join
  endtask

  initial begin
    int t0;
    t_valid = 0; s_valid = 0; wr_en = 0; wr_bank = 0; wr_addr = 0; wr_data = 0;
    t_in = '0; s_in = '0;
    // fill both banks: fullness random, different per bank
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < 2**AW; a++) begin
        bloom_t w;
        w = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
        img[b][a] = w;
      end
    repeat (2) @(posedge clk);
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < 2**AW; a++) begin
        @(negedge clk); wr_en = 1; wr_bank = b[0]; wr_addr = a[AW-1:0]; wr_data = img[b][a];
      end
    @(negedge clk); wr_en = 0;
    rst_n = 1;
    for (int p = 0; p < 150; p++) send_packet(1 + $urandom % 6, 1 + $urandom % MAX_QV);
    // rate: 4 tuples, all outputs ready -> out tuple valid 8 cycles after first tuple accepted
    stall = 0;
    repeat (20) @(posedge clk);
    fork
      send_packet(4, 2);
      begin
        @(posedge clk iff (t_valid && t_ready)); t0 = $time;
        @(posedge clk iff mt_valid);
        check(($time - t0) / 10 == 8, $sformatf("rate: tuple out after %0d cycles", ($time - t0) / 10));
      end
    join
    // stop
    exp_t.push_back('{tbl: '0, indexing: '0, last: 1'b0, stop: 1'b1});
    exp_s.push_back('{node: STOP_NODE, last: 1'b1});
    @(negedge clk); t_valid = 1; t_in = '{tbl: '0, indexing: '0, last: 1'b0, stop: 1'b1};
    s_valid = 1; s_in = '{node: STOP_NODE, last: 1'b1};
    @(posedge clk iff t_ready); @(negedge clk); t_valid = 0;
    @(posedge clk iff s_ready); @(negedge clk); s_valid = 0;
    repeat (20) @(posedge clk);
    check(exp_t.size() == 0 && exp_b.size() == 0 && exp_s.size() == 0, "all outputs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

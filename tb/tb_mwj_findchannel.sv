// tb_mwj_findchannel: sends 200 (tuple, bloom, packet) groups with random
// indexing nodes and random output stalls, and checks that every item
// arrives, in order, on the channel given by the MSB of the indexing node's
// hash (recomputed here), and nothing on the other. Then sends a stop and
// checks that both channels receive a stop tuple and a stop node.
module tb_mwj_findchannel;
  import less_pkg::*;
  logic clk = 0, rst_n = 0;
  logic t_valid, t_ready, b_valid, b_ready, s_valid, s_ready;
  fmin_tuple_t t_in;
  bloom_t b_in;
  vertex_t s_in;
  logic [1:0] ot_valid, ot_ready, ob_valid, ob_ready, os_valid, os_ready;
  fmin_tuple_t ot_out [2];
  bloom_t ob_out [2];
  vertex_t os_out [2];
  logic [31:0] routed [2];
  int checks = 0, failures = 0;
  fmin_tuple_t et[2][$];
  bloom_t eb[2][$];
  vertex_t es[2][$];
  int npk[2];

  mwj_findchannel dut (.*);
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

  always @(negedge clk) begin
    ot_ready = 2'($urandom); ob_ready = 2'($urandom); os_ready = 2'($urandom);
  end

  for (genvar c = 0; c < 2; c++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (ot_valid[c] && ot_ready[c]) begin
        check(et[c].size() != 0 && ot_out[c] == et[c][0], $sformatf("ch%0d tuple %h", c, ot_out[c]));
        if (et[c].size() != 0) void'(et[c].pop_front());
      end
      if (ob_valid[c] && ob_ready[c]) begin
        check(eb[c].size() != 0 && ob_out[c] == eb[c][0], $sformatf("ch%0d bloom", c));
        if (eb[c].size() != 0) void'(eb[c].pop_front());
      end
      if (os_valid[c] && os_ready[c]) begin
        check(es[c].size() != 0 && os_out[c] == es[c][0], $sformatf("ch%0d sol %h", c, os_out[c]));
        if (es[c].size() != 0) void'(es[c].pop_front());
      end
    end
  end

  task automatic push_t(input fmin_tuple_t t);
    @(negedge clk); t_valid = 1; t_in = t;
    do @(posedge clk); while (!t_ready);
    @(negedge clk); t_valid = 0;
  endtask
  task automatic push_b(input bloom_t b);
    @(negedge clk); b_valid = 1; b_in = b;
    do @(posedge clk); while (!b_ready);
    @(negedge clk); b_valid = 0;
  endtask
  task automatic push_s(input vertex_t v);
    @(negedge clk); s_valid = 1; s_in = v;
    do @(posedge clk); while (!s_ready);
    @(negedge clk); s_valid = 0;
  endtask

  initial begin
    fmin_tuple_t t;
    bloom_t b;
    vertex_t v;
    node_t h;
    int ch, ns;
    t_valid = 0; b_valid = 0; s_valid = 0; t_in = '0; b_in = '0; s_in = '0;
    npk[0] = 0; npk[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 200; p++) begin
      t = '{tbl: TABLE_W'($urandom), indexing: $urandom % 100000, last: 1'b1, stop: 1'b0};
      h = t.indexing * 32'h9E37_79B1;
      ch = h[31];
      npk[ch]++;
      b = {$urandom, $urandom};
      et[ch].push_back(t); eb[ch].push_back(b);
      ns = 1 + $urandom % MAX_QV;
      push_t(t); push_b(b);
      for (int i = 0; i < ns; i++) begin
        v = '{node: $urandom % 100000, last: (i == ns - 1)};
        es[ch].push_back(v);
        push_s(v);
      end
    end
    // stop
    t = '{tbl: '0, indexing: '0, last: 1'b0, stop: 1'b1};
    v = '{node: STOP_NODE, last: 1'b1};
    for (int c = 0; c < 2; c++) begin et[c].push_back(t); es[c].push_back(v); end
    push_t(t); push_s(v);
    repeat (30) @(posedge clk);
    for (int c = 0; c < 2; c++) begin
      check(et[c].size() == 0 && eb[c].size() == 0 && es[c].size() == 0, $sformatf("ch%0d drained", c));
      check(npk[c] > 0 && routed[c] == npk[c], $sformatf("ch%0d routed %0d exp %0d", c, routed[c], npk[c]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

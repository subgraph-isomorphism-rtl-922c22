// tb_mwj_homomorphism: sends packets (solution nodes, one minset word,
// candidate nodes, some equal to solution nodes) and checks the hstream
// against a model: solution nodes, minset, surviving candidates with last on
// the final survivor, or a nil terminator if none survive. Includes a stop
// node and random output stalls; checks the dropped-candidate counter.
module tb_mwj_homomorphism;
  import less_pkg::*;
  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, m_valid, m_ready, e_valid, e_ready, h_valid, h_ready;
  vertex_t s_in, e_in;
  node_t m_in;
  seq_t h_out;
  logic [31:0] dropped;
  int checks = 0, failures = 0, ndrop = 0, nnil = 0;
  seq_t exp_q[$];

  mwj_homomorphism dut (.*);
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

  always @(negedge clk) h_ready = ($urandom % 4) != 0;
  always @(posedge clk) if (rst_n && h_valid && h_ready) begin
    check(exp_q.size() != 0 && h_out == exp_q[0],
      $sformatf("got %h/%0d/%0d exp %h/%0d/%0d", h_out.node, h_out.last, h_out.nil,
                exp_q[0].node, exp_q[0].last, exp_q[0].nil));
    if (exp_q.size() != 0) void'(exp_q.pop_front());
  end

  task automatic packet(input int ns, input int ne);
    node_t sol[$], cand[$], keep[$];
    node_t mw;
    sol = {}; cand = {}; keep = {};
    for (int i = 0; i < ns; i++) sol.push_back($urandom % 50);
    for (int i = 0; i < ne; i++) cand.push_back($urandom % 50);
    mw = $urandom;
    foreach (sol[i]) exp_q.push_back('{node: sol[i], last: (i == ns - 1), nil: 1'b0});
    exp_q.push_back('{node: mw, last: 1'b0, nil: 1'b0});
    foreach (cand[i]) begin
      bit inside_sol = 0;
      foreach (sol[k]) if (sol[k] == cand[i]) inside_sol = 1;
      if (!inside_sol) keep.push_back(cand[i]); else ndrop++;
    end
    if (keep.size() == 0) begin
      exp_q.push_back('{node: '0, last: 1'b1, nil: 1'b1});
      nnil++;
    end
    foreach (keep[i]) exp_q.push_back('{node: keep[i], last: (i == keep.size() - 1), nil: 1'b0});
    fork
      foreach (sol[i]) begin
        @(negedge clk); s_valid = 1; s_in = '{node: sol[i], last: (i == ns - 1)};
        do @(posedge clk); while (!s_ready);
        @(negedge clk); s_valid = 0;
      end
      begin
        @(negedge clk); m_valid = 1; m_in = mw;
        do @(posedge clk); while (!m_ready);
        @(negedge clk); m_valid = 0;
      end
      foreach (cand[i]) begin
        @(negedge clk); e_valid = 1; e_in = '{node: cand[i], last: (i == ne - 1)};
        do @(posedge clk); while (!e_ready);
        @(negedge clk); e_valid = 0;
      end
    join
  endtask

  initial begin
    s_valid = 0; m_valid = 0; e_valid = 0; s_in = '0; e_in = '0; m_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    packet(3, 1);
    packet(1, 1);
    for (int p = 0; p < 300; p++) packet(1 + $urandom % MAX_QV, 1 + $urandom % 12);
    // stop
    exp_q.push_back('{node: STOP_NODE, last: 1'b1, nil: 1'b0});
    @(negedge clk); s_valid = 1; s_in = '{node: STOP_NODE, last: 1'b1};
    do @(posedge clk); while (!s_ready);
    @(negedge clk); s_valid = 0;
    repeat (20) @(posedge clk);
    check(exp_q.size() == 0, "all beats seen");
    check(dropped == ndrop && ndrop > 0, $sformatf("dropped %0d exp %0d", dropped, ndrop));
    check(nnil > 0, "empty candidate set exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

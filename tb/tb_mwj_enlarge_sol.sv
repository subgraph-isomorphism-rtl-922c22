// tb_mwj_enlarge_sol: feeds compressed partial-solution words (radix groups,
// FAKE_NODE starts, STOP_NODE) and checks the decompressed packets against a
// model built in the testbench. Output stalls are random. Also checks the
// emission rate: radices+1 beats per extension, one per cycle when the
// output is always ready.
module tb_mwj_enlarge_sol;
  import less_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  node_t in_word;
  vertex_t out;
  int checks = 0, failures = 0;
  node_t words[$];
  vertex_t exp_q[$];

  mwj_enlarge_sol dut (.*);
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

  // Independent model: one packet per extension.
  task automatic model();
    node_t rad[$];
    bit prev_ext = 0;
    node_t w;
    foreach (words[i]) begin
      w = words[i];
      if (w == STOP_NODE) begin
        exp_q.push_back('{node: STOP_NODE, last: 1});
        rad.delete(); prev_ext = 0;
      end else if (w[31]) begin
        if (prev_ext) rad.delete();
        if (w != FAKE_NODE) rad.push_back({1'b0, w[30:0]});
        prev_ext = 0;
      end else begin
        foreach (rad[k]) exp_q.push_back('{node: rad[k], last: 0});
        exp_q.push_back('{node: w, last: 1});
        prev_ext = 1;
      end
    end
  endtask

  int n_out = 0;
  bit stall_on = 1;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    vertex_t e;
    e = exp_q.pop_front();
    check(out == e, $sformatf("beat %0d got %h/%0d exp %h/%0d", n_out, out.node, out.last, e.node, e.last));
    n_out++;
  end
  always @(negedge clk) out_ready = stall_on ? (($urandom % 4) != 0) : 1'b1;

  initial begin
    int t0, nexp;
    in_valid = 0; in_word = 0;
    // FAKE + first extensions, then groups of growing depth, then stop
    words = '{FAKE_NODE, 32'd5, 32'd9};
    for (int g = 0; g < 40; g++) begin
      int nr, ne;
      nr = 1 + ($urandom % (MAX_QV - 1));
      ne = 1 + ($urandom % 4);
      for (int r = 0; r < nr; r++) words.push_back(32'h8000_0000 | ($urandom % 1000));
      for (int e = 0; e < ne; e++) words.push_back($urandom % 1000);
    end
    words.push_back(STOP_NODE);
    model();
    nexp = exp_q.size();
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (words[i]) begin
      @(negedge clk);
      in_valid = 1; in_word = words[i];
      do @(posedge clk); while (!in_ready);
    end
    @(negedge clk); in_valid = 0;
    repeat (50) @(posedge clk);
    check(n_out == nexp && exp_q.size() == 0, $sformatf("beats out %0d expected %0d", n_out, nexp));
    // rate: group of 3 radices + 1 extension -> 4 beats in 4 cycles
    stall_on = 0;
    words = '{32'h8000_0001, 32'h8000_0002, 32'h8000_0003, 32'd4};
    model();
    foreach (words[i]) begin
      @(negedge clk);
      in_valid = 1; in_word = words[i];
      do @(posedge clk); while (!in_ready);
    end
    @(negedge clk); in_valid = 0;
    t0 = n_out;
    repeat (4) @(posedge clk);
    #1 check(n_out - t0 == 4, $sformatf("rate: %0d beats in 4 cycles", n_out - t0));
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, "all beats seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

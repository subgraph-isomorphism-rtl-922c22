// tb_mwj_merge_h: two producers send random hstream sequences (solution
// nodes, minset word, candidates) with random gaps, then a stop each. Every
// word carries its channel in bit 30, so the checker can take each output
// sequence as a whole and compare it with the next expected sequence of that
// channel. Checks that sequences never interleave, that both channels'
// traffic arrives complete and in order, that the stop of the first channel
// is swallowed, and that exactly one stop leaves after both stops.
module tb_mwj_merge_h;
  import less_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] h_valid, h_ready;
  seq_t h_in [2];
  logic o_valid, o_ready;
  seq_t o_out;
  logic [31:0] seqs [2];
  int checks = 0, failures = 0, nstop = 0;
  seq_t src[2][$];
  seq_t expq[2][$];
  int nseq[2];
  int phase = 0, cur = -1;
  bit done_stop = 0;

  mwj_merge_h dut (.*);
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

  // producers
  for (genvar c = 0; c < 2; c++) begin : g_src
    initial begin
      h_valid[c] = 0; h_in[c] = '0;
      @(posedge rst_n);
      while (src[c].size() != 0) begin
        @(negedge clk);
        if ($urandom % 3 == 0) begin h_valid[c] = 0; continue; end
        h_valid[c] = 1; h_in[c] = src[c][0];
        @(posedge clk);
        if (h_ready[c]) void'(src[c].pop_front());
      end
      @(negedge clk); h_valid[c] = 0;
    end
  end

  function automatic void gen(int c, int n);
    seq_t s;
    for (int k = 0; k < n; k++) begin
      int ns, ne;
      bit nil;
      ns = 1 + $urandom % MAX_QV; ne = $urandom % 6; nil = (ne == 0);
      for (int i = 0; i < ns; i++) begin
        s = '{node: {1'b0, c[0], 30'($urandom)}, last: (i == ns - 1), nil: 1'b0};
        src[c].push_back(s); expq[c].push_back(s);
      end
      s = '{node: {1'b0, c[0], 30'($urandom)}, last: 1'b0, nil: 1'b0};
      src[c].push_back(s); expq[c].push_back(s);
      if (nil) begin
        s = '{node: '0 | (c << 30), last: 1'b1, nil: 1'b1};
        src[c].push_back(s); expq[c].push_back(s);
      end
      for (int i = 0; i < ne; i++) begin
        s = '{node: {1'b0, c[0], 30'($urandom)}, last: (i == ne - 1), nil: 1'b0};
        src[c].push_back(s); expq[c].push_back(s);
      end
    end
    src[c].push_back('{node: STOP_NODE, last: 1'b1, nil: 1'b0});
  endfunction

  always @(negedge clk) o_ready = ($urandom % 4) != 0;

  // checker: a sequence = nodes..last, minset, set..last
  always @(posedge clk) if (rst_n && o_valid && o_ready) begin
    if (o_out.node == STOP_NODE) begin
      nstop++;
      check(phase == 0, "stop between sequences");
      check(src[0].size() == 0 && src[1].size() == 0, "stop only after both inputs stopped");
    end else begin
      int c;
      c = o_out.node[30];
      if (phase == 0 && cur == -1) cur = c;
      check(c == cur, $sformatf("interleaving: word of ch%0d inside sequence of ch%0d", c, cur));
      check(expq[c].size() != 0 && o_out == expq[c][0], $sformatf("ch%0d word mismatch", c));
      if (expq[c].size() != 0) void'(expq[c].pop_front());
      case (phase)
        0: if (o_out.last) phase = 1;
        1: phase = 2;
        2: if (o_out.last) begin phase = 0; cur = -1; nseq[c]++; end
      endcase
    end
  end

  initial begin
    nseq[0] = 0; nseq[1] = 0;
    gen(0, 120); gen(1, 60);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (src[0].size() == 0 && src[1].size() == 0);
    repeat (40) @(posedge clk);
    check(nstop == 1, $sformatf("stops out %0d", nstop));
    check(expq[0].size() == 0 && expq[1].size() == 0, "all words out");
    check(nseq[0] == 120 && nseq[1] == 60, $sformatf("sequences %0d %0d", nseq[0], nseq[1]));
    check(seqs[0] == 120 && seqs[1] == 60, "sequence counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

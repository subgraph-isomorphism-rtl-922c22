// tb_mwj_tuplebuild_split: drives a mix of solution packets, edge sets
// (the last tuple of each set flagged last_edge), real last_set tuples and a
// final stop, with random output stalls. A model built here routes each item:
// solution nodes to the solution output, edges to the channel given by the MSB
// of the node hash, last_set and stop to both channels, and one padding
// last_set (pos = 1) to both channels after each last_edge tuple. Every
// output is compared in order; the padding counter is checked.
module tb_mwj_tuplebuild_split;
  import less_pkg::*;
  logic clk = 0, rst_n = 0;
  logic i_valid, i_ready, s_valid, s_ready;
  itup_t i_in;
  vertex_t s_out;
  logic [1:0] t_valid, t_ready;
  itup_t t_out [2];
  logic [31:0] paddings;
  int checks = 0, failures = 0, npad = 0, nch[2];
  itup_t inq[$];
  vertex_t es[$];
  itup_t et[2][$];

  mwj_tuplebuild_split dut (.*);
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

  always @(negedge clk) begin s_ready = $urandom % 3 != 0; t_ready = 2'($urandom); end

  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready) begin
      check(es.size() != 0 && s_out == es[0], $sformatf("sol %h", s_out));
      if (es.size() != 0) void'(es.pop_front());
    end
    for (int c = 0; c < 2; c++) if (t_valid[c] && t_ready[c]) begin
      check(et[c].size() != 0 && t_out[c] == et[c][0], $sformatf("ch%0d tuple %h", c, t_out[c]));
      if (et[c].size() != 0) void'(et[c].pop_front());
    end
  end

  function automatic void add(itup_t t);
    itup_t pad;
    node_t h;
    inq.push_back(t);
    case (t.kind)
      IT_SOL: es.push_back('{node: t.node, last: t.last});
      IT_EDGE: begin
        h = t.node * 32'h9E37_79B1;
        et[h[31]].push_back(t); nch[h[31]]++;
        if (t.last_edge) begin
          pad = '0; pad.kind = IT_LAST_SET; pad.pos = 1'b1; pad.tbl = t.tbl;
          et[0].push_back(pad); et[1].push_back(pad); npad++;
        end
      end
      default: begin et[0].push_back(t); et[1].push_back(t); end
    endcase
  endfunction

  initial begin
    itup_t t;
    nch[0] = 0; nch[1] = 0;
    for (int p = 0; p < 60; p++) begin
      int ns, nsets;
      ns = 1 + $urandom % MAX_QV;
      for (int i = 0; i < ns; i++) begin
        t = '0; t.kind = IT_SOL; t.node = $urandom % 100000; t.last = (i == ns - 1);
        add(t);
      end
      nsets = 1 + $urandom % 3;
      for (int s = 0; s < nsets; s++) begin
        int ne;
        ne = 1 + $urandom % 6;
        for (int i = 0; i < ne; i++) begin
          t = '0; t.kind = IT_EDGE; t.node = $urandom % 100000; t.tbl = TABLE_W'(s);
          t.last_edge = (i == ne - 1);
          add(t);
        end
      end
      t = '0; t.kind = IT_LAST_SET; add(t);
    end
    t = '0; t.kind = IT_STOP; add(t);
    i_valid = 0; i_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (inq[i]) begin
      @(negedge clk); i_valid = 1; i_in = inq[i];
      do @(posedge clk); while (!i_ready);
    end
    @(negedge clk); i_valid = 0;
    repeat (30) @(posedge clk);
    check(es.size() == 0 && et[0].size() == 0 && et[1].size() == 0, "all outputs seen");
    check(paddings == npad && npad > 0, $sformatf("paddings %0d exp %0d", paddings, npad));
    check(nch[0] > 0 && nch[1] > 0, "both channels used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mwj_mergeasmset: builds the two channel streams that the tuple split
// produces (edges routed by hash MSB, the last edge of each set on its own
// channel followed by padding last_set on both, a real last_set on both after
// each solution, a stop on both) and plays them with independent random
// gaps. The checker accepts any interleaving of the two channels but
// requires: each channel's regular edges in order; the stored last edge of a
// set to leave only after every edge of that set; one real last_set per
// solution; one stop at the end.
module tb_mwj_mergeasmset;
  import less_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] t_valid, t_ready;
  itup_t t_in [2];
  logic o_valid, o_ready;
  itup_t o_out;
  logic [31:0] syncs;
  int checks = 0, failures = 0, nsync = 0;
  itup_t src[2][$];
  // expected output, as groups
  typedef struct { itup_t reg_q[2][$]; itup_t fin; int kind; } group_t; // kind 0 set, 1 last_set, 2 stop
  group_t groups[$];
  int uid = 1;

  mwj_mergeasmset dut (.*);
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

  for (genvar c = 0; c < 2; c++) begin : g_src
    initial begin
      t_valid[c] = 0; t_in[c] = '0;
      @(posedge rst_n);
      while (src[c].size() != 0) begin
        @(negedge clk);
        if ($urandom % 3 == 0) begin t_valid[c] = 0; continue; end
        t_valid[c] = 1; t_in[c] = src[c][0];
        @(posedge clk);
        if (t_ready[c]) void'(src[c].pop_front());
      end
      @(negedge clk); t_valid[c] = 0;
    end
  end

  always @(negedge clk) o_ready = ($urandom % 4) != 0;

  function automatic int chan(node_t n);
    node_t h;
    h = n * 32'h9E37_79B1;
    return h[31];
  endfunction

  always @(posedge clk) if (rst_n && o_valid && o_ready) begin
    if (groups.size() == 0) check(0, "output with nothing expected");
    else if (o_out.kind == IT_EDGE && !o_out.last_edge) begin
      int c;
      c = chan(o_out.node);
      check(groups[0].kind == 0 && groups[0].reg_q[c].size() != 0 && groups[0].reg_q[c][0] == o_out,
            $sformatf("regular edge %0d out of order", o_out.node));
      if (groups[0].reg_q[c].size() != 0) void'(groups[0].reg_q[c].pop_front());
    end else begin
      check(groups[0].reg_q[0].size() == 0 && groups[0].reg_q[1].size() == 0,
            "group closed before all its edges");
      check(o_out == groups[0].fin, $sformatf("closing tuple %h exp %h", o_out, groups[0].fin));
      void'(groups.pop_front());
    end
  end

  initial begin
    itup_t t, pad;
    group_t g;
    for (int s = 0; s < 50; s++) begin
      int nsets;
      nsets = 1 + $urandom % 3;
      for (int k = 0; k < nsets; k++) begin
        int ne;
        ne = 1 + $urandom % 7;
        g.reg_q[0] = {}; g.reg_q[1] = {}; g.kind = 0;
        for (int i = 0; i < ne; i++) begin
          t = '0; t.kind = IT_EDGE; t.node = uid++ * 7; t.last_edge = (i == ne - 1);
          src[chan(t.node)].push_back(t);
          if (t.last_edge) g.fin = t; else g.reg_q[chan(t.node)].push_back(t);
        end
        pad = '0; pad.kind = IT_LAST_SET; pad.pos = 1;
        src[0].push_back(pad); src[1].push_back(pad);
        groups.push_back(g); nsync++;
      end
      t = '0; t.kind = IT_LAST_SET;
      src[0].push_back(t); src[1].push_back(t);
      g.reg_q[0] = {}; g.reg_q[1] = {}; g.kind = 1; g.fin = t;
      groups.push_back(g); nsync++;
    end
    t = '0; t.kind = IT_STOP;
    src[0].push_back(t); src[1].push_back(t);
    g.reg_q[0] = {}; g.reg_q[1] = {}; g.kind = 2; g.fin = t;
    groups.push_back(g); nsync++;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (src[0].size() == 0 && src[1].size() == 0);
    repeat (30) @(posedge clk);
    check(groups.size() == 0, $sformatf("%0d groups not closed", groups.size()));
    check(syncs == nsync, $sformatf("syncs %0d exp %0d", syncs, nsync));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

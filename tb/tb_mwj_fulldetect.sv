// tb_mwj_fulldetect: sends packets of 1..MAX_QV nodes with a query size of 5
// (then 3) and checks that each packet comes back unchanged, with out_full on
// every beat exactly when its length equals the query size; then a stop.
// Also checks the counter of complete solutions and that the last output beat of
// an n-node packet leaves 2n-1 cycles after its first input beat.
module tb_mwj_fulldetect;
  import less_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [$clog2(MAX_QV+1)-1:0] nq;
  logic in_valid, in_ready, out_valid, out_ready, out_full;
  vertex_t in_v, out_v;
  logic [31:0] full_count;
  int checks = 0, failures = 0, nfull = 0;
  vertex_t ev[$];
  bit ef[$];
  bit stall = 1;

  mwj_fulldetect dut (.*);
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

  always @(negedge clk) out_ready = stall ? ($urandom % 3 != 0) : 1'b1;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    check(ev.size() != 0 && out_v == ev[0] && out_full == ef[0],
          $sformatf("beat %h/%0d full %0d", out_v.node, out_v.last, out_full));
    if (ev.size() != 0) begin void'(ev.pop_front()); void'(ef.pop_front()); end
  end

  task automatic packet(input int n);
    vertex_t v;
    for (int i = 0; i < n; i++) begin
      v = '{node: $urandom % 100000, last: (i == n - 1)};
      ev.push_back(v); ef.push_back(n == nq);
      @(negedge clk); in_valid = 1; in_v = v;
      do @(posedge clk); while (!in_ready);
    end
    if (n == nq) nfull++;
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    int t0;
    in_valid = 0; in_v = '0; nq = 5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 150; p++) begin
      if (p == 75) begin wait (ev.size() == 0); nq = 3; end
      packet(1 + $urandom % MAX_QV);
    end
    wait (ev.size() == 0);
    // latency of a 4-node packet with the output always ready
    stall = 0;
    @(negedge clk);
    fork
      packet(4);
      begin
        @(posedge clk iff (in_valid && in_ready)); t0 = $time;
        wait (ev.size() == 0); @(negedge clk);
        check(($time - t0) / 10 == 7, $sformatf("last beat %0d cycles after first", ($time - t0) / 10));
      end
    join
    ev.push_back('{node: STOP_NODE, last: 1'b1}); ef.push_back(0);
    @(negedge clk); in_valid = 1; in_v = '{node: STOP_NODE, last: 1'b1};
    do @(posedge clk); while (!in_ready);
    @(negedge clk); in_valid = 0;
    repeat (10) @(posedge clk);
    check(ev.size() == 0, "all beats seen");
    check(full_count == nfull && nfull > 0, $sformatf("full %0d exp %0d", full_count, nfull));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sol_fifo: random pushes and pops against a queue model; checks data
// order, the full and empty flags, count, and first-word fall-through
// (a word written is readable on the next cycle).
module tb_sol_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic wr_valid, wr_ready, rd_valid, rd_ready;
  logic [31:0] wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [31:0] q[$];

  sol_fifo #(.W(32), .DEPTH(DEPTH)) dut (.*);

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

  initial begin
    wr_valid = 0; rd_ready = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!rd_valid && wr_ready && count == 0, "empty after reset");
    // fill completely
    for (int i = 0; i < DEPTH; i++) begin
      wr_valid = 1; wr_data = 32'h100 + i;
      @(posedge clk); q.push_back(wr_data);
      @(negedge clk);
      check(rd_valid, "readable the cycle after the write");
    end
    wr_valid = 0;
    check(!wr_ready && count == DEPTH, "full flag");
    // random traffic
    for (int cyc = 0; cyc < 4000; cyc++) begin
      wr_valid = ($urandom % 3) != 0;
      wr_data  = $urandom;
      rd_ready = ($urandom % 2) != 0;
      #1;
      check(count == q.size(), "count matches model");
      check(rd_valid == (q.size() != 0), "rd_valid matches model");
      check(wr_ready == (q.size() != DEPTH), "wr_ready matches model");
      if (rd_valid) check(rd_data == q[0], $sformatf("data %h vs %h", rd_data, q[0]));
      @(posedge clk);
      if (rd_valid && rd_ready) void'(q.pop_front());
      if (wr_valid && wr_ready) q.push_back(wr_data);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bloom_ram: writes distinct words to both banks, reads them back in
// random order and checks bank separation and the one-cycle read latency
// (the data is present on the clock edge after rd_en).
module tb_bloom_ram;
  import less_pkg::*;
  localparam int AW = 6;
  logic clk = 0;
  logic wr_en, rd_en;
  logic [0:0] wr_bank, rd_bank;
  logic [AW-1:0] wr_addr, rd_addr;
  bloom_t wr_data, rd_data;
  bloom_t img [2][2**AW];
  int checks = 0, failures = 0;

  bloom_ram #(.BANKS(2), .AW(AW)) dut (.*);
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

  initial begin
    wr_en = 0; rd_en = 0; wr_bank = 0; rd_bank = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < 2**AW; a++) begin
        img[b][a] = {$urandom, $urandom};
        @(negedge clk); wr_en = 1; wr_bank = b[0]; wr_addr = a[AW-1:0]; wr_data = img[b][a];
      end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 1000; i++) begin
      int b, a;
      b = $urandom % 2; a = $urandom % (2**AW);
      @(negedge clk); rd_en = 1; rd_bank = b[0]; rd_addr = a[AW-1:0];
      @(posedge clk); #1;
      check(rd_data == img[b][a], $sformatf("bank %0d addr %0d", b, a));
      // overwrite sometimes and check write-then-read
      if (i % 10 == 0) begin
        img[b][a] = {$urandom, $urandom};
        @(negedge clk); rd_en = 0; wr_en = 1; wr_bank = b[0]; wr_addr = a[AW-1:0]; wr_data = img[b][a];
        @(negedge clk); wr_en = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

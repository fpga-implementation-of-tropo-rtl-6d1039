// Testbench for sync_fifo: order, empty, threshold flag and count against a
// queue model under random traffic.
`include "tb/tb_util.svh"
module tb_sync_fifo;
  `TB_COUNTERS
  logic clk = 0, sclr = 1, wr_en = 0, rd_en = 0;
  logic [7:0] din = 0, dout;
  logic dout_valid, empty, full;
  logic [4:0] count;
  logic [7:0] q [$];
  logic [7:0] exp_d;
  bit exp_v, exp_w;
  always #5 clk = ~clk;
  sync_fifo #(.W(8), .AW(4), .THRESH(6)) dut (.*);
  `TB_WATCHDOG(10000)
  initial begin
    repeat (2) @(posedge clk);
    sclr = 0;
    for (int t = 0; t < 2000; t++) begin
      wr_en = ($urandom % 3) != 0; din = 8'($urandom);
      rd_en = (t > 1000) ? ($urandom % 3) != 0 : ($urandom % 3) == 0;
      exp_v = rd_en && q.size() > 0;
      exp_w = wr_en && q.size() < 16;   // a full FIFO refuses a write
      @(posedge clk); #1;
      if (exp_v) exp_d = q.pop_front();
      if (exp_w) q.push_back(din);
      `CHECK(dout_valid == exp_v, "dout_valid")
      if (exp_v) `CHECK(dout == exp_d, "order")
      `CHECK(count == q.size(), "count")
      `CHECK(empty == (q.size() == 0), "empty")
      `CHECK(full == (q.size() >= 6), "threshold flag")
    end
    `TB_FINISH
  end
endmodule

// Testbench for sdp_ram: random writes and reads against a reference array,
// one-cycle read latency, read enable holds the output.
`include "tb/tb_util.svh"
module tb_sdp_ram;
  `TB_COUNTERS
  logic clk = 0, we = 0, re = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata, hold;
  logic [15:0] model [256];
  logic [15:0] expect_q;
  bit valid_q;
  always #5 clk = ~clk;
  sdp_ram #(.W(16), .AW(8)) dut (.*);
  `TB_WATCHDOG(10000)
  initial begin
    for (int a = 0; a < 256; a++) begin
      we = 1; waddr = 8'(a); wdata = 16'($urandom); model[a] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int t = 0; t < 600; t++) begin
      we = $urandom % 2; waddr = 8'($urandom); wdata = 16'($urandom);
      re = $urandom % 2; raddr = 8'($urandom);
      expect_q = model[raddr]; valid_q = re; hold = rdata;
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      if (valid_q) `CHECK(rdata == expect_q, "read data")
      else         `CHECK(rdata == hold, "hold without re")
    end
    `TB_FINISH
  end
endmodule

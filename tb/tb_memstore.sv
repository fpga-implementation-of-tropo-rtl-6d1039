// Testbench for memstore: the stream carries its own sample index; a read
// burst must return location+32, +33, ... one cycle after rd_en.
`include "tb/tb_util.svh"
module tb_memstore;
  `TB_COUNTERS
  logic clk = 0, sclr = 1, rd_en = 0, dout_valid;
  logic signed [15:0] din_r, din_i, dout_r, dout_i;
  logic [7:0] location = 0;
  int t = 0;
  int k;
  always #5 clk = ~clk;
  memstore #(.DW(16), .AW(8), .CP(32)) dut (.*);
  assign din_r = 16'(t);
  assign din_i = ~16'(t);
  always @(posedge clk) if (!sclr) t <= t + 1;
  `TB_WATCHDOG(20000)
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) sclr = 0;
    for (int burst = 0; burst < 4; burst++) begin
      int L, start;
      repeat (100 + 37 * burst) @(negedge clk);
      L = t - 60;               // preamble ended 60 samples ago
      location = 8'(L);
      start = L + 32;
      k = 0;
      @(negedge clk) rd_en = 1;
      `CHECK(dout_valid == 0, "no valid before the read")
      for (int n = 0; n < 150; n++) begin
        @(negedge clk);
        `CHECK(dout_valid == 1, "valid one cycle after rd_en")
        `CHECK(dout_r == 16'(start + n) && dout_i == ~16'(start + n), $sformatf("burst %0d word %0d", burst, n))
      end
      rd_en = 0;
      @(negedge clk);
      `CHECK(dout_valid == 0, "valid falls")
    end
    `TB_FINISH
  end
endmodule

// Testbench for shift_reg: random words must come out exactly DEPTH cycles
// later; clr empties the chain; en=0 freezes it.
`include "tb/tb_util.svh"
module tb_shift_reg;
  `TB_COUNTERS
  localparam int W = 16, D = 32;
  logic clk = 0, sclr = 1, clr = 0, en = 1;
  logic [W-1:0] din, dout;
  logic [W-1:0] hist [$];
  always #5 clk = ~clk;
  shift_reg #(.W(W), .DEPTH(D)) dut (.*);
  `TB_WATCHDOG(10000)
  initial begin
    din = 0;
    repeat (2) @(posedge clk);
    sclr = 0;
    for (int t = 0; t < 200; t++) begin
      din = W'($urandom);
      hist.push_back(din);
      @(posedge clk); #1;
      if (hist.size() > D) void'(hist.pop_front());
      if (t >= D - 1) `CHECK(dout == hist[0], $sformatf("delay t=%0d", t))
    end
    en = 0; din = 16'h1234;
    repeat (5) @(posedge clk); #1;
    `CHECK(dout == hist[0], "frozen with en=0")
    en = 1; clr = 1; @(posedge clk); #1; clr = 0;
    `CHECK(dout == 0, "clr empties")
    `TB_FINISH
  end
endmodule

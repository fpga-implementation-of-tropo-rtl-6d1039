// Testbench for register_bank: taps w0, w32, w64 equal the input now, 32 and
// 64 samples ago.
`include "tb/tb_util.svh"
module tb_register_bank;
  `TB_COUNTERS
  logic clk = 0, sclr = 1, clr = 0;
  logic signed [15:0] din, w0, w32, w64;
  logic signed [15:0] hist [$];
  always #5 clk = ~clk;
  register_bank #(.W(16), .DEPTH(32)) dut (.*);
  `TB_WATCHDOG(10000)
  initial begin
    din = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) sclr = 0;
    for (int t = 0; t < 300; t++) begin
      din = 16'($urandom);
      #1;
      hist.push_back(din);
      `CHECK(w0 == din, "w0")
      if (t >= 64) begin
        `CHECK(w32 == hist[t-32], $sformatf("w32 t=%0d", t))
        `CHECK(w64 == hist[t-64], $sformatf("w64 t=%0d", t))
      end
      @(negedge clk);
    end
    `TB_FINISH
  end
endmodule

// Testbench for accumulator: running sum with enable and clear.
`include "tb/tb_util.svh"
module tb_accumulator;
  `TB_COUNTERS
  logic clk = 0, sclr = 1, clr = 0, en = 0;
  logic signed [38:0] din, acc;
  longint ref_sum;
  always #5 clk = ~clk;
  accumulator #(.W(39)) dut (.*);
  `TB_WATCHDOG(10000)
  initial begin
    din = 0; ref_sum = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) sclr = 0;
    for (int t = 0; t < 400; t++) begin
      din = 39'(int'($urandom));
      en  = ($urandom % 4) != 0;
      clr = (t == 200);
      @(negedge clk);
      if (clr) ref_sum = 0; else if (en) ref_sum += 64'(din);
      `CHECK(64'(acc) == ref_sum, $sformatf("acc t=%0d", t))
    end
    `TB_FINISH
  end
endmodule

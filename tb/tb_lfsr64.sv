// Testbench for lfsr64: reference LFSR in the testbench, reversed output,
// hold without enable.
`include "tb/tb_util.svh"
module tb_lfsr64;
  `TB_COUNTERS
  logic clk = 0, sclr = 1, en = 0;
  logic [7:0] out_f, out_r;
  logic [63:0] st;
  always #5 clk = ~clk;
  lfsr64 #(.REVERSE(1'b0)) dut_f (.clk, .sclr, .en, .out(out_f));
  lfsr64 #(.REVERSE(1'b1)) dut_r (.clk, .sclr, .en, .out(out_r));
  function automatic logic [7:0] rev8(input logic [7:0] b);
    for (int i = 0; i < 8; i++) rev8[i] = b[7-i];
  endfunction
  `TB_WATCHDOG(10000)
  initial begin
    st = 64'hACE1_2468_1357_9BDF;
    repeat (2) @(posedge clk);
    @(negedge clk) sclr = 0;
    for (int t = 0; t < 1000; t++) begin
      en = 1'($urandom % 2);
      `CHECK(out_f == st[7:0], "forward byte")
      `CHECK(out_r == rev8(st[7:0]), "reversed byte")
      @(negedge clk);
      if (en) st = {st[62:0], st[63] ^ st[62] ^ st[60] ^ st[59]};
    end
    `TB_FINISH
  end
endmodule

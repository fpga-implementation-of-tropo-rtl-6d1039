// Testbench for cordic_rotate: cos/sin of random angles in +-pi against
// $cos/$sin, and the latency of ITER+1 cycles.
`include "tb/tb_util.svh"
module tb_cordic_rotate;
  `TB_COUNTERS
  localparam int W = 32, ITER = 20;
  logic clk = 0, sclr = 1, in_valid = 0, out_valid;
  logic signed [W-1:0] angle = 0, cos_o, sin_o;
  real ang_in [$];
  int sent_cycle [$];
  int cyc = 0;
  real a, ec, es;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  cordic_rotate #(.W(W), .ITER(ITER)) dut (.*);
  `TB_WATCHDOG(20000)
  always @(posedge clk) begin
    if (!sclr && out_valid) begin
      a  = ang_in.pop_front();
      ec = real'(cos_o) / 1073741824.0 - $cos(a);
      es = real'(sin_o) / 1073741824.0 - $sin(a);
      `CHECK(ec < 1e-5 && ec > -1e-5, $sformatf("cos(%f)", a))
      `CHECK(es < 1e-5 && es > -1e-5, $sformatf("sin(%f)", a))
      `CHECK(cyc - sent_cycle.pop_front() == ITER + 1, "latency")
    end
  end
  initial begin
    repeat (2) @(posedge clk);
    sclr = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      a = ($urandom % 62800) / 10000.0 - 3.14;
      angle = W'(longint'(a * 536870912.0));
      in_valid = ($urandom % 4) != 0;
      if (in_valid) begin ang_in.push_back(real'(angle) / 536870912.0); sent_cycle.push_back(cyc); end
    end
    @(negedge clk) in_valid = 0;
    repeat (ITER + 5) @(posedge clk);
    `CHECK(ang_in.size() == 0, "all results returned")
    `TB_FINISH
  end
endmodule

// Testbench for cordic_vector: angle of random vectors in all quadrants
// against $atan2, and the latency of ITER+1 cycles.
`include "tb/tb_util.svh"
module tb_cordic_vector;
  `TB_COUNTERS
  localparam int W = 32, ITER = 20;
  localparam real SCALE = 536870912.0; // 2^29
  logic clk = 0, sclr = 1, in_valid = 0, out_valid;
  logic signed [W-1:0] x = 0, y = 0, angle;
  real ang_in [$];
  real got, want, err;
  int sent_cycle [$];
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  cordic_vector #(.W(W), .ITER(ITER)) dut (.*);
  `TB_WATCHDOG(20000)
  // checker
  always @(posedge clk) begin
    if (!sclr && out_valid) begin
      want = ang_in.pop_front();
      got  = real'(angle) / SCALE;
      err  = got - want;
      if (err > 3.14159265) err -= 6.28318531;
      if (err < -3.14159265) err += 6.28318531;
      `CHECK(err < 1e-4 && err > -1e-4, $sformatf("angle want %f got %f", want, got))
      `CHECK(cyc - sent_cycle.pop_front() == ITER + 1, "latency")
    end
  end
  initial begin
    real th, r;
    repeat (2) @(posedge clk);
    sclr = 0;
    for (int t = 0; t < 400; t++) begin
      th = ($urandom % 62832) / 10000.0 - 3.1416;
      r  = 1000.0 + ($urandom % 1000000) * 1000.0;
      @(negedge clk);
      x = W'(longint'(r * $cos(th)));
      y = W'(longint'(r * $sin(th)));
      in_valid = ($urandom % 4) != 0;
      if (in_valid) begin ang_in.push_back($atan2(real'(y), real'(x))); sent_cycle.push_back(cyc); end
    end
    @(negedge clk) in_valid = 0;
    repeat (ITER + 5) @(posedge clk);
    `CHECK(ang_in.size() == 0, "all results returned")
    `TB_FINISH
  end
endmodule

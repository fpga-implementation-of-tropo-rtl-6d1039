// Testbench for freq_correct: for a held phase estimate, sine/cosine for
// index n must equal sin/cos((phase/32)*n), computed here in floating point
// without any angle reduction, over a whole frame of 4864 indices so that the
// angle wraps many times. corr_enable must follow freq_enable by 22 cycles.
`include "tb/tb_util.svh"
module tb_freq_correct;
  `TB_COUNTERS
  localparam int N = 4864, LAT = 22;
  logic clk = 0, sclr = 1, freq_enable = 0, corr_enable;
  logic signed [31:0] phase = 0;
  logic signed [15:0] sine, cosine;
  int cyc = 0, en_rise, ce_rise, n_out, ce_len;
  real step, a, es, ec, worst;
  always #5 clk = ~clk;
  freq_correct dut (.*);
  `TB_WATCHDOG(40000)
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (corr_enable) begin
      if (n_out == 0) ce_rise = cyc;
      a  = step * n_out;
      es = real'(sine)   / 16384.0 - $sin(a);
      ec = real'(cosine) / 16384.0 - $cos(a);
      if (es < 0) es = -es;
      if (ec < 0) ec = -ec;
      if (es > worst) worst = es;
      if (ec > worst) worst = ec;
      `CHECK(es < 3.0 / 16384 && ec < 3.0 / 16384, $sformatf("n=%0d angle %f", n_out, a))
      n_out++;
    end
  end
  initial begin
    static logic signed [31:0] ph [3] = '{32'sd1610612736, -32'sd123456789, 32'sd1000};
    repeat (3) @(posedge clk);
    @(negedge clk) sclr = 0;
    foreach (ph[k]) begin
      worst = 0; n_out = 0;
      phase = ph[k];
      step  = real'(phase >>> 5) / 536870912.0;
      repeat (3) @(negedge clk);
      freq_enable = 1; en_rise = cyc;
      repeat (N) @(negedge clk);
      freq_enable = 0;
      repeat (LAT + 4) @(negedge clk);
      `CHECK(n_out == N, "one output per enabled cycle")
      `CHECK(ce_rise - en_rise == LAT, "latency of 22 cycles")
      $display("phase %0d: worst error %e", phase, worst);
    end
    `TB_FINISH
  end
endmodule

// Testbench for topmsandc: frames with a carrier frequency offset are
// preceded by random samples. The detector must fire once per frame, shortly
// after the preamble; location must be the address of the first sample
// after the preamble (address = cycles since reset, modulo 256); the phase
// must equal -32*offset, the angle between the two preamble halves.
`include "tb/tb_util.svh"
module tb_topmsandc;
  `TB_COUNTERS
  `include "tb/ofdm_gen.svh"
  logic clk = 0, sclr = 1, clr = 0, packet, phase_valid;
  logic signed [15:0] din_r = 0, din_i = 0;
  logic [15:0] threshold = 16'd45875;   // 0.7
  logic [7:0] location;
  logic signed [31:0] phase;
  int cyc = 0, npk, pk_cyc, base, rst_cyc;
  real got, want;
  always #5 clk = ~clk;
  topmsandc dut (.*);
  `TB_WATCHDOG(40000)
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (packet) begin npk++; pk_cyc = cyc; end
  end
  initial begin
    static real om [6] = '{0.01, -0.004, 0.0, 0.02, -0.03, 0.001};
    repeat (3) @(posedge clk);
    @(negedge clk) sclr = 0;
    rst_cyc = cyc;
    foreach (om[f]) begin
      gen_frame(100 + 37 * f, 50, 4000, om[f], 0.3 * f);
      npk = 0;
      base = cyc - rst_cyc;
      // sample n of the stream is written at address base + n
      for (int n = 0; n < rx_r_q.size(); n++) begin
        din_r = 16'(rx_r_q[n]); din_i = 16'(rx_i_q[n]);
        clr = packet;   // the control block clears right after detection
        @(negedge clk);
      end
      clr = 0;
      repeat (30) @(negedge clk);
      `CHECK(npk == 1, $sformatf("frame %0d detected once (%0d)", f, npk))
      `CHECK(location == 8'(base + pre_end), $sformatf("location %0d want %0d", location, (base + pre_end) % 256))
      `CHECK(pk_cyc - rst_cyc - (base + pre_end) >= 0 && pk_cyc - rst_cyc - (base + pre_end) < 8,
             $sformatf("detection latency %0d", pk_cyc - rst_cyc - (base + pre_end)))
      got  = real'(phase) / 536870912.0;
      want = -32.0 * om[f];
      `CHECK(got - want < 1e-4 && want - got < 1e-4, $sformatf("phase %f want %f", got, want))
      `CHECK(phase_valid == 0, "phase_valid is a pulse")
    end
    `TB_FINISH
  end
endmodule

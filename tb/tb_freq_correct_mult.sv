// Testbench for freq_correct_mult: the complex product with a 2.14 rotation
// factor against an integer reference, including saturation at full scale.
`include "tb/tb_util.svh"
module tb_freq_correct_mult;
  `TB_COUNTERS
  logic signed [15:0] data_r, data_i, sine, cosine, data_out_freq_r, data_out_freq_i;
  logic corr_enable, channel_enable;
  longint pr, pi_;
  int nsat = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  freq_correct_mult dut (.*);
  function automatic longint sat16(input longint v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction
  `TB_WATCHDOG(1000)
  initial begin
    for (int t = 0; t < 3000; t++) begin
      data_r = 16'($urandom); data_i = 16'($urandom);
      if (t % 3 == 0) begin
        // a unit-magnitude rotation factor
        automatic real a = ($urandom % 6283) / 1000.0;
        cosine = 16'(int'($cos(a) * 16384.0)); sine = 16'(int'($sin(a) * 16384.0));
      end else begin
        sine = 16'($urandom); cosine = 16'($urandom);
      end
      corr_enable = 1'($urandom);
      #1;
      pr  = (longint'(data_r) * cosine - longint'(data_i) * sine) >>> 14;
      pi_ = (longint'(data_i) * cosine + longint'(data_r) * sine) >>> 14;
      if (sat16(pr) != pr || sat16(pi_) != pi_) nsat++;
      `CHECK(data_out_freq_r == 16'(sat16(pr)), "real part")
      `CHECK(data_out_freq_i == 16'(sat16(pi_)), "imaginary part")
      `CHECK(channel_enable == corr_enable, "enable passes")
    end
    `CHECK(nsat > 0, "saturation exercised")
    `TB_FINISH
  end
endmodule

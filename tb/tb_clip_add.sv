// Testbench for clip_add: saturating sum against a wide reference, including
// both saturation limits.
`include "tb/tb_util.svh"
module tb_clip_add;
  `TB_COUNTERS
  logic signed [15:0] a, b, out;
  int s, e;
  int n_hi = 0, n_lo = 0;
  clip_add #(.W(16)) dut (.*);
  initial begin
    for (int t = 0; t < 3000; t++) begin
      a = 16'($urandom); b = 16'($urandom);
      #1;
      s = int'(a) + int'(b);
      e = (s > 32767) ? 32767 : (s < -32768) ? -32768 : s;
      if (s > 32767) n_hi++;
      if (s < -32768) n_lo++;
      `CHECK(int'(out) == e, $sformatf("%0d + %0d", a, b))
    end
    `CHECK(n_hi > 0 && n_lo > 0, "both limits exercised")
    `TB_FINISH
  end
endmodule

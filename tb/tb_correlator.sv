// Testbench for correlator: products against integer reference formulas.
`include "tb/tb_util.svh"
module tb_correlator;
  `TB_COUNTERS
  logic clk = 0;
  logic signed [15:0] w0r, w0i, w32r, w32i, w64r, w64i;
  logic signed [32:0] ac0, ac32, ac64, cc320r, cc320i, cc6432r, cc6432i;
  longint a, b, c, d, e, f;
  correlator #(.W(16)) dut (.*);
  initial begin
    for (int t = 0; t < 500; t++) begin
      {w0r, w0i, w32r, w32i} = {$urandom, $urandom};
      {w64r, w64i} = $urandom;
      if (t == 0) begin w0r = -32768; w0i = -32768; w32r = -32768; w32i = -32768; w64r = -32768; w64i = -32768; end
      #1;
      a = 64'(w0r); b = 64'(w0i); c = 64'(w32r); d = 64'(w32i); e = 64'(w64r); f = 64'(w64i);
      `CHECK(64'(ac0) == a*a + b*b, "ac0")
      `CHECK(64'(ac32) == c*c + d*d, "ac32")
      `CHECK(64'(ac64) == e*e + f*f, "ac64")
      `CHECK(64'(cc320r) == a*c + b*d, "cc320r")
      `CHECK(64'(cc320i) == a*d - b*c, "cc320i")
      `CHECK(64'(cc6432r) == e*c + f*d, "cc6432r")
      `CHECK(64'(cc6432i) == c*f - d*e, "cc6432i")
    end
    `TB_FINISH
  end
endmodule

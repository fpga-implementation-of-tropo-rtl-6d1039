// Testbench for clip_tree: reference of three nested saturating additions.
`include "tb/tb_util.svh"
module tb_clip_tree;
  `TB_COUNTERS
  logic signed [15:0] in1, in2, in3, in4, out;
  function automatic int sat(input int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction
  clip_tree #(.W(16)) dut (.*);
  initial begin
    for (int t = 0; t < 3000; t++) begin
      in1 = 16'($urandom); in2 = 16'($urandom); in3 = 16'($urandom); in4 = 16'($urandom);
      if (t % 3 == 0) begin in1 = in1 >>> 4; in2 = in2 >>> 4; in3 = in3 >>> 4; in4 = in4 >>> 4; end
      #1;
      `CHECK(int'(out) == sat(sat(int'(in1) + int'(in2)) + sat(int'(in3) + int'(in4))), "tree")
    end
    `TB_FINISH
  end
endmodule

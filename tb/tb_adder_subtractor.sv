// Testbench for adder_subtractor: four differences against integer arithmetic.
`include "tb/tb_util.svh"
module tb_adder_subtractor;
  `TB_COUNTERS
  logic signed [32:0] ac0, ac32, ac64, cc320r, cc320i, cc6432r, cc6432i;
  logic signed [33:0] acs1, acs2, ccsr, ccsi;
  adder_subtractor #(.W(33)) dut (.*);
  function automatic logic signed [32:0] r33();
    return {$urandom, $urandom};
  endfunction
  initial begin
    for (int t = 0; t < 500; t++) begin
      ac0 = r33(); ac32 = r33(); ac64 = r33(); cc320r = r33(); cc320i = r33(); cc6432r = r33(); cc6432i = r33();
      #1;
      `CHECK(64'(acs1) == 64'(ac0) - 64'(ac32), "acs1")
      `CHECK(64'(acs2) == 64'(ac32) - 64'(ac64), "acs2")
      `CHECK(64'(ccsr) == 64'(cc320r) - 64'(cc6432r), "ccsr")
      `CHECK(64'(ccsi) == 64'(cc320i) - 64'(cc6432i), "ccsi")
    end
    `TB_FINISH
  end
endmodule

// adder_subtractor: the four subtractors between the correlator and the
// accumulators of the Schmidl-Cox detector. Each difference is the value
// entering a 32-long window minus the value leaving it, so that a plain
// accumulator yields the sliding-window sum:
//   acs1 = ac0 - ac32, acs2 = ac32 - ac64,
//   ccsr = cc320r - cc6432r, ccsi = cc320i - cc6432i.
// Combinational; outputs are one bit wider than the inputs.
module adder_subtractor #(
  parameter int W = 33
) (
  input  logic signed [W-1:0] ac0, ac32, ac64,
  input  logic signed [W-1:0] cc320r, cc320i, cc6432r, cc6432i,
  output logic signed [W:0]   acs1, acs2, ccsr, ccsi
);
  assign acs1 = (W+1)'(ac0)    - (W+1)'(ac32);
  assign acs2 = (W+1)'(ac32)   - (W+1)'(ac64);
  assign ccsr = (W+1)'(cc320r) - (W+1)'(cc6432r);
  assign ccsi = (W+1)'(cc320i) - (W+1)'(cc6432i);
endmodule

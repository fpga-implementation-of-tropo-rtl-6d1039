// correlator: the five products of the Schmidl-Cox detector, combinational
// (multiplier latency 0). Energies of the three taps:
//   ac0 = |w0|^2, ac32 = |w32|^2, ac64 = |w64|^2
// and the lag-32 cross products
//   cc320  = conj(w0)  * w32   (re: w0r*w32r + w0i*w32i, im: w0r*w32i - w0i*w32r)
//   cc6432 = conj(w32) * w64   (re: w64r*w32r + w64i*w32i, im: w32r*w64i - w32i*w64r)
// Results are kept at full precision, 2W+1 bits.
module correlator #(
  parameter int W = 16
) (
  input  logic signed [W-1:0]  w0r, w0i, w32r, w32i, w64r, w64i,
  output logic signed [2*W:0]  ac0, ac32, ac64,
  output logic signed [2*W:0]  cc320r, cc320i, cc6432r, cc6432i
);
  function automatic logic signed [2*W:0] mul(input logic signed [W-1:0] a, input logic signed [W-1:0] b);
    return (2*W+1)'(a) * (2*W+1)'(b);
  endfunction

  always_comb begin
    ac0     = mul(w0r, w0r)   + mul(w0i, w0i);
    ac32    = mul(w32r, w32r) + mul(w32i, w32i);
    ac64    = mul(w64r, w64r) + mul(w64i, w64i);
    cc320r  = mul(w0r, w32r)  + mul(w0i, w32i);
    cc320i  = mul(w0r, w32i)  - mul(w0i, w32r);
    cc6432r = mul(w64r, w32r) + mul(w64i, w32i);
    cc6432i = mul(w32r, w64i) - mul(w32i, w64r);
  end
endmodule

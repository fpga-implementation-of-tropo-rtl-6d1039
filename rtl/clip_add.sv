// clip_add: W-bit signed addition that saturates instead of wrapping.
// Inputs of opposite sign cannot overflow and are simply added. If both have
// the same sign and the sum's sign differs, the sum is clipped to the most
// negative (0x8000) or most positive (0x7fff) value. Combinational.
module clip_add #(
  parameter int W = 16
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] out
);
  logic signed [W-1:0] sum;
  logic                ovf;
  assign sum = a + b;
  assign ovf = (a[W-1] == b[W-1]) && (sum[W-1] != a[W-1]);
  always_comb begin
    if (!ovf)        out = sum;
    else if (a[W-1]) out = {1'b1, {(W-1){1'b0}}};
    else             out = {1'b0, {(W-1){1'b1}}};
  end
endmodule

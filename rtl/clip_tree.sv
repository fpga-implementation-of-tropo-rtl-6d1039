// clip_tree: combines four receive streams into one with three saturating
// adders: (in1 + in2) and (in3 + in4) are clipped, and their clipped sum is
// clipped again. Combinational.
module clip_tree #(
  parameter int W = 16
) (
  input  logic signed [W-1:0] in1, in2, in3, in4,
  output logic signed [W-1:0] out
);
  logic signed [W-1:0] s12, s34;
  clip_add #(.W(W)) u_c12 (.a(in1), .b(in2), .out(s12));
  clip_add #(.W(W)) u_c34 (.a(in3), .b(in4), .out(s34));
  clip_add #(.W(W)) u_cf  (.a(s12), .b(s34), .out(out));
endmodule

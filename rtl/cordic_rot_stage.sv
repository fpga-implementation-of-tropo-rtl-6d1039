// cordic_rot_stage: one pipelined iteration I of a rotation-mode CORDIC.
// The residual angle z is driven towards zero by atan(2^-I): if z < 0 the
// vector turns clockwise (x += y>>>I, y -= x>>>I, z += atan), otherwise
// anticlockwise (x -= y>>>I, y += x>>>I, z -= atan). One register stage.
module cordic_rot_stage #(
  parameter int W = 32,   // width of x, y (2.(W-2)) and z (3.(W-3))
  parameter int I = 0
) (
  input  logic                clk,
  input  logic                sclr,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_in, y_in, z_in,
  output logic                out_valid,
  output logic signed [W-1:0] x_out, y_out, z_out
);
  import modem_pkg::atan_fx;
  localparam logic signed [W-1:0] ATAN = W'(atan_fx(I, W - 3));

  logic signed [W-1:0] x_shr, y_shr;
  logic                z_neg;
  assign x_shr = x_in >>> I;
  assign y_shr = y_in >>> I;
  assign z_neg = z_in[W-1];

  always_ff @(posedge clk) begin
    if (sclr) begin
      out_valid <= 1'b0; x_out <= '0; y_out <= '0; z_out <= '0;
    end else begin
      out_valid <= in_valid;
      x_out <= z_neg ? x_in + y_shr : x_in - y_shr;
      y_out <= z_neg ? y_in - x_shr : y_in + x_shr;
      z_out <= z_neg ? z_in + ATAN  : z_in - ATAN;
    end
  end
endmodule

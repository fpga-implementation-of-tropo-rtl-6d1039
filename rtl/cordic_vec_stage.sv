// cordic_vec_stage: one pipelined iteration I of a vectoring CORDIC.
// The vector is turned towards the x axis by atan(2^-I) using shifts and adds:
// if y < 0 it turns anticlockwise (x -= y>>>I, y += x>>>I, z -= atan),
// otherwise clockwise (x += y>>>I, y -= x>>>I, z += atan). z accumulates the
// angle in 3.(W-3) radians. One register stage; valid travels with the data.
module cordic_vec_stage #(
  parameter int IW = 34,   // width of x and y
  parameter int ZW = 32,   // width of the angle
  parameter int I  = 0     // iteration index
) (
  input  logic                 clk,
  input  logic                 sclr,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] x_in, y_in,
  input  logic signed [ZW-1:0] z_in,
  output logic                 out_valid,
  output logic signed [IW-1:0] x_out, y_out,
  output logic signed [ZW-1:0] z_out
);
  import modem_pkg::atan_fx;
  localparam logic signed [ZW-1:0] ATAN = ZW'(atan_fx(I, ZW - 3));

  logic signed [IW-1:0] x_shr, y_shr;
  logic                 y_neg;
  assign x_shr = x_in >>> I;
  assign y_shr = y_in >>> I;
  assign y_neg = y_in[IW-1];

  always_ff @(posedge clk) begin
    if (sclr) begin
      out_valid <= 1'b0; x_out <= '0; y_out <= '0; z_out <= '0;
    end else begin
      out_valid <= in_valid;
      x_out <= y_neg ? x_in - y_shr : x_in + y_shr;
      y_out <= y_neg ? y_in + x_shr : y_in - x_shr;
      z_out <= y_neg ? z_in - ATAN  : z_in + ATAN;
    end
  end
endmodule

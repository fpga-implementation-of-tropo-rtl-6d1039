// cordic_vector: pipelined vectoring-mode CORDIC giving angle = atan2(y, x).
// Stage 0 folds vectors with x < 0 into the right half plane (negating x and y
// and starting z at +-pi); ITER iteration stages follow. Input x, y are W-bit
// signed; the angle is W-bit in 3.(W-3) format (radians, range +-pi).
// Latency ITER+1 cycles, one result per cycle; in_valid travels as out_valid.
// Two guard bits absorb the CORDIC gain of 1.647 instead of dividing the
// inputs by it first, since only the angle is used.
module cordic_vector #(
  parameter int W    = 32,
  parameter int ITER = 20
) (
  input  logic                clk,
  input  logic                sclr,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] y,
  output logic                out_valid,
  output logic signed [W-1:0] angle
);
  import modem_pkg::pi_fx;
  localparam int IW = W + 2;
  localparam logic signed [W-1:0] PI_FX = W'(pi_fx(W - 3));

  logic signed [IW-1:0] xs [ITER+1];
  logic signed [IW-1:0] ys [ITER+1];
  logic signed [W-1:0]  zs [ITER+1];
  logic                 vs [ITER+1];

  // quadrant stage
  always_ff @(posedge clk) begin
    if (sclr) begin
      vs[0] <= 1'b0; xs[0] <= '0; ys[0] <= '0; zs[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      if (x < 0) begin
        xs[0] <= -IW'(x);
        ys[0] <= -IW'(y);
        zs[0] <= (y >= 0) ? PI_FX : -PI_FX;
      end else begin
        xs[0] <= IW'(x);
        ys[0] <= IW'(y);
        zs[0] <= '0;
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    cordic_vec_stage #(.IW(IW), .ZW(W), .I(i)) u_stage (
      .clk, .sclr,
      .in_valid(vs[i]), .x_in(xs[i]), .y_in(ys[i]), .z_in(zs[i]),
      .out_valid(vs[i+1]), .x_out(xs[i+1]), .y_out(ys[i+1]), .z_out(zs[i+1]));
  end

  assign out_valid = vs[ITER];
  assign angle     = zs[ITER];
endmodule

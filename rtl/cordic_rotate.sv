// cordic_rotate: pipelined rotation-mode CORDIC giving cos and sin of angle.
// The input angle is W-bit 3.(W-3) radians, valid in +-pi (a little beyond is
// tolerated). Stage 0 folds angles outside +-pi/2 by pi and starts from the
// negated vector; the start vector is (K, 0) with K = 1/1.647 so the CORDIC
// gain cancels. Outputs are W-bit 2.(W-2). Latency ITER+1 cycles.
module cordic_rotate #(
  parameter int W    = 32,
  parameter int ITER = 20
) (
  input  logic                clk,
  input  logic                sclr,
  input  logic                in_valid,
  input  logic signed [W-1:0] angle,
  output logic                out_valid,
  output logic signed [W-1:0] cos_o,
  output logic signed [W-1:0] sin_o
);
  import modem_pkg::cordic_k_fx, modem_pkg::pi_fx;
  localparam logic signed [W-1:0] PI_FX   = W'(pi_fx(W - 3));
  localparam logic signed [W-1:0] HALF_PI = PI_FX >>> 1;
  localparam logic signed [W-1:0] K_FX    = W'(cordic_k_fx(ITER, W - 2));

  logic signed [W-1:0] xs [ITER+1];
  logic signed [W-1:0] ys [ITER+1];
  logic signed [W-1:0] zs [ITER+1];
  logic                vs [ITER+1];

  always_ff @(posedge clk) begin
    if (sclr) begin
      vs[0] <= 1'b0; xs[0] <= '0; ys[0] <= '0; zs[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      ys[0] <= '0;
      if (angle > HALF_PI) begin
        xs[0] <= -K_FX;
        zs[0] <= angle - PI_FX;
      end else if (angle < -HALF_PI) begin
        xs[0] <= -K_FX;
        zs[0] <= angle + PI_FX;
      end else begin
        xs[0] <= K_FX;
        zs[0] <= angle;
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    cordic_rot_stage #(.W(W), .I(i)) u_stage (
      .clk, .sclr,
      .in_valid(vs[i]), .x_in(xs[i]), .y_in(ys[i]), .z_in(zs[i]),
      .out_valid(vs[i+1]), .x_out(xs[i+1]), .y_out(ys[i+1]), .z_out(zs[i+1]));
  end

  assign out_valid = vs[ITER];
  assign cos_o     = xs[ITER];
  assign sin_o     = ys[ITER];
endmodule

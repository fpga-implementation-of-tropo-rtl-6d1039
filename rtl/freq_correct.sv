// freq_correct: per-sample sine and cosine for frequency-offset correction.
// While freq_enable is high a counter n runs 0,1,2,... one step per cycle.
// The multiplier forms theta_n = (phase >>> SHIFT) * n, the phase estimate
// divided by the correlation lag of 2^SHIFT = 32 samples times the sample
// index; theta_n is reduced to +-pi by subtracting round(theta_n/2pi)*2pi
// (the division done as a multiplication by a fixed-point 1/2pi) and fed to a
// rotation-mode CORDIC. sine/cosine are 16-bit 2.14. corr_enable is
// freq_enable delayed by the full latency LAT = ITER + 2 cycles, so
// sine/cosine for index n are present LAT cycles after counter value n.
// The per-sample division by 32 and the modulo-2pi reduction are this
// design's own reading of the scaling the original took from its C model.
// After the reduction the angle lies within +-pi, so only the low W bits of
// the wide difference are kept; its upper bits are sign copies.
module freq_correct #(
  parameter int W     = 32,   // angle width, 3.(W-3) radians
  parameter int ITER  = 20,
  parameter int CNT_W = 13,
  parameter int SHIFT = 5,
  parameter int OW    = 16    // sine/cosine width, 2.(OW-2)
) (
  input  logic                 clk,
  input  logic                 sclr,
  input  logic signed [W-1:0]  phase,
  input  logic                 freq_enable,
  output logic signed [OW-1:0] sine,
  output logic signed [OW-1:0] cosine,
  output logic                 corr_enable
);
  import modem_pkg::PI, modem_pkg::pi_fx, modem_pkg::pow2;
  localparam int PRW = W + CNT_W + 1;           // product width
  localparam int S   = W - 3 + 31;              // scale of 1/2pi
  localparam int QW  = PRW + 34;
  localparam longint TWO_PI = 2 * pi_fx(W - 3);
  localparam longint INV_2PI = longint'(pow2(31) / (2.0 * PI));

  logic [CNT_W-1:0]       cnt;
  logic signed [PRW-1:0]  prod;
  logic signed [QW-1:0]   qprod;
  logic signed [PRW-1:0]  q;
  logic signed [W-1:0]    wrapped_full;
  logic signed [W-1:0]    wrapped;
  logic                   v1;
  logic signed [W-1:0]    c_full, s_full;

  always_ff @(posedge clk) begin
    if (sclr || !freq_enable) cnt <= '0;
    else                      cnt <= cnt + 1'b1;
  end

  always_comb begin
    prod  = PRW'(phase >>> SHIFT) * $signed({1'b0, cnt});
    qprod = QW'(prod) * QW'(INV_2PI) + (QW'(1) <<< (S - 1));
    q     = PRW'(qprod >>> S);
    wrapped_full = W'(prod - q * PRW'(TWO_PI));
  end

  always_ff @(posedge clk) begin
    if (sclr) begin
      wrapped <= '0; v1 <= 1'b0;
    end else begin
      wrapped <= wrapped_full;
      v1      <= freq_enable;
    end
  end

  cordic_rotate #(.W(W), .ITER(ITER)) u_cordic (
    .clk, .sclr, .in_valid(v1), .angle(wrapped),
    .out_valid(corr_enable), .cos_o(c_full), .sin_o(s_full));

  assign cosine = OW'(c_full >>> (W - OW));
  assign sine   = OW'(s_full >>> (W - OW));
endmodule

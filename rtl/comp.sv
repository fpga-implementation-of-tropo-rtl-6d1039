// comp: preamble decision of the Schmidl-Cox detector.
// Inputs are the sliding-window sums: ac1, ac2 (energies of the newest and the
// previous 32 samples) and P = ccr + j*cci (their cross-correlation).
// The sample is "above" when
//     |P|^2 * 2^TH_FRAC >= threshold * ac1 * ac2       (threshold in Q0.16)
// i.e. the normalized metric |P|^2/(ac1*ac2), which is 1 for two identical
// halves, exceeds threshold. A run of samples above threshold is a preamble
// when it lasts at least SAFETY cycles (the safety period). While the run
// lasts, the largest |P|^2 is tracked; when the run ends (first sample below
// threshold, or RUN_MAX samples) packet pulses for one cycle with the
// cross-correlation and the location of that peak. Detection therefore comes
// a few cycles after the peak, which is where the two preamble halves line
// up exactly.
// location is tcount at the peak: with the accumulators one cycle behind the
// write address this is the address of the first sample after the preamble.
// The threshold test, the safety count and the crossing itself follow the
// description; the exact metric of the original C model is not available,
// so the normalized form above, the peak search over the run and RUN_MAX are
// this design's choices. clr aborts a run and keeps the last result on the
// outputs.
module comp #(
  parameter int ACC_W   = 39,
  parameter int AW      = 8,
  parameter int TH_W    = 16,
  parameter int TH_FRAC = 16,
  parameter int SAFETY  = 4,
  parameter int RUN_MAX = 64
) (
  input  logic                    clk,
  input  logic                    sclr,
  input  logic                    clr,
  input  logic signed [ACC_W-1:0] ac1,
  input  logic signed [ACC_W-1:0] ac2,
  input  logic signed [ACC_W-1:0] ccr,
  input  logic signed [ACC_W-1:0] cci,
  input  logic        [TH_W-1:0]  threshold,
  input  logic        [AW-1:0]    tcount,
  output logic                    packet,
  output logic signed [ACC_W-1:0] cc_r,
  output logic signed [ACC_W-1:0] cc_i,
  output logic        [AW-1:0]    location
);
  localparam int PW = 2 * ACC_W + TH_FRAC + 2;
  localparam int CW = $clog2(RUN_MAX + 1);

  logic [PW-1:0] p2, r2, lhs, rhs, best_p2;
  logic          above, is_best, fire;
  logic [CW-1:0] run;
  logic signed [ACC_W-1:0] best_r, best_i;
  logic [AW-1:0] best_loc;

  always_comb begin
    p2    = PW'(ccr) * PW'(ccr) + PW'(cci) * PW'(cci);
    r2    = PW'(ac1) * PW'(ac2);
    lhs   = p2 << TH_FRAC;
    rhs   = PW'(threshold) * r2;
    above = (ac1 > 0) && (ac2 > 0) && (lhs >= rhs);
    is_best = (run == '0) || (p2 > best_p2);
    // end of a run long enough to be a preamble
    fire  = (32'(run) >= SAFETY) && (!above || 32'(run) == RUN_MAX);
  end

  always_ff @(posedge clk) begin
    if (sclr) begin
      run <= '0; packet <= 1'b0;
      best_p2 <= '0; best_r <= '0; best_i <= '0; best_loc <= '0;
      cc_r <= '0; cc_i <= '0; location <= '0;
    end else if (clr) begin
      run <= '0; packet <= 1'b0;
    end else begin
      packet <= fire;
      if (fire) begin
        cc_r     <= best_r;
        cc_i     <= best_i;
        location <= best_loc;
        run      <= '0;
      end else if (above) begin
        if (is_best) begin
          best_p2 <= p2; best_r <= ccr; best_i <= cci; best_loc <= tcount;
        end
        run <= run + 1'b1;
      end else begin
        run <= '0;
      end
    end
  end
endmodule

// shift_reg: DEPTH registers of W bits connected in series (a delay line).
// dout is din delayed by DEPTH clock cycles. sclr (reset) and clr (the receiver
// control block's per-frame clear) both empty the chain to zero; en freezes it.
// A chain of plain registers as the modem's parameterized shift register; the
// enable and the extra clear are this design's choices.
module shift_reg #(
  parameter int W     = 16,
  parameter int DEPTH = 32
) (
  input  logic         clk,
  input  logic         sclr,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [W-1:0] q [DEPTH];

  always_ff @(posedge clk) begin
    if (sclr || clr) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else if (en) begin
      q[0] <= din;
      for (int i = 1; i < DEPTH; i++) q[i] <= q[i-1];
    end
  end

  assign dout = q[DEPTH-1];
endmodule

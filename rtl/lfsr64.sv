// lfsr64: 64-bit Fibonacci LFSR used to scramble the message so that long
// runs of zeros never reach the transmitter's IFFT. On each clock with en
// the register shifts once; the new bit is the XOR of taps 64, 63, 61 and 60
// (primitive polynomial x^64+x^63+x^61+x^60+1). The 8-bit output is the low
// byte of the register, bit-reversed when REVERSE=1: the receiver packs the
// first received bit into the MSB while the transmitter sends the LSB first.
// Polynomial, seed and the choice of output bits are this design's choices.
module lfsr64 #(
  parameter logic [63:0] SEED    = 64'hACE1_2468_1357_9BDF,
  parameter bit          REVERSE = 1'b0
) (
  input  logic       clk,
  input  logic       sclr,
  input  logic       en,
  output logic [7:0] out
);
  logic [63:0] state;

  always_ff @(posedge clk) begin
    if (sclr)    state <= SEED;
    else if (en) state <= {state[62:0], state[63] ^ state[62] ^ state[60] ^ state[59]};
  end

  always_comb begin
    for (int i = 0; i < 8; i++) out[i] = REVERSE ? state[7-i] : state[i];
  end
endmodule

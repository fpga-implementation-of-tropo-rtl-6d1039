// Testbench for scfdma_tx: two encoder bursts of 1152 bit pairs through the
// whole SC-FDMA transmitter. Each frame must be 1866 consecutive words:
// the 234-word header, then three symbols, each its last 32 words followed
// by 512 words in which every 16th position carries the pilot (+A,-A) and
// the rest carry the QPSK symbols of the bits in order, padded to 1440
// with (+A,+A).
`include "tb/tb_util.svh"
module tb_scfdma_tx;
  `TB_COUNTERS
  localparam int NB = 1152, HDR = 234, NFFT = 512, CP = 32, TOTAL = 1866;
  localparam logic signed [15:0] A = 16'sd11585;
  logic clk = 0, sclr = 1, enc_send = 0, enc_valid = 0, enc_take, tx_valid;
  logic [1:0] enc_bits = 0;
  logic signed [15:0] tx_i, tx_q;
  logic [1:0] bits [NB];
  logic [31:0] seq [160];
  logic [31:0] exp_w [TOTAL];
  int nout, first_out, last_out, cyc = 0;
  always #5 clk = ~clk;
  scfdma_tx dut (.*);
  `TB_WATCHDOG(30000)
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tx_valid) begin
      if (nout == 0) first_out = cyc;
      last_out = cyc;
      `CHECK(nout < TOTAL && {tx_i, tx_q} == exp_w[nout], $sformatf("frame word %0d", nout))
      nout++;
    end
  end
  function automatic logic [31:0] qpsk(input logic [1:0] b);
    return {b[0] ? -A : A, b[1] ? -A : A};
  endfunction
  initial begin
    static logic [15:0] lf = 16'hACE1;
    logic b [320];
    logic [31:0] sym [3][NFFT];
    int d;
    for (int j = 0; j < 320; j++) begin
      b[j] = lf[0];
      lf = {lf[14:0], lf[15] ^ lf[13] ^ lf[12] ^ lf[10]};
    end
    for (int n = 0; n < 160; n++) seq[n] = {b[2*n] ? -A : A, b[2*n+1] ? -A : A};
    repeat (3) @(posedge clk);
    @(negedge clk) sclr = 0;
    for (int f = 0; f < 2; f++) begin
      for (int n = 0; n < NB; n++) bits[n] = 2'($urandom);
      // expected frame
      for (int k = 0; k < 10; k++)  exp_w[k] = seq[22 + k];
      for (int k = 0; k < 64; k++)  exp_w[10 + k] = seq[k % 32];
      for (int k = 0; k < 32; k++)  exp_w[74 + k] = seq[128 + k];
      for (int k = 0; k < 128; k++) exp_w[106 + k] = seq[32 + k];
      d = 0;
      for (int s = 0; s < 3; s++)
        for (int p = 0; p < NFFT; p++) begin
          if (p % 16 == 0) sym[s][p] = {A, -A};
          else begin
            sym[s][p] = (d < NB) ? qpsk(bits[d]) : {A, A};
            d++;
          end
        end
      for (int s = 0; s < 3; s++)
        for (int p = 0; p < CP + NFFT; p++)
          exp_w[HDR + s * (CP + NFFT) + p] = sym[s][p < CP ? NFFT - CP + p : p - CP];
      nout = 0;
      // encoder
      enc_send = 1;
      while (!enc_take) @(negedge clk);
      enc_send = 0;
      for (int n = 0; n < NB; n++) begin
        enc_bits = bits[n]; enc_valid = 1; @(negedge clk);
      end
      enc_valid = 0;
      while (nout < TOTAL) @(negedge clk);
      repeat (20) @(negedge clk);
      `CHECK(nout == TOTAL, "one frame of 1866 words")
      `CHECK(last_out - first_out == TOTAL - 1, "frame is contiguous")
      `CHECK(d == 1440, "reference built 1440 data symbols")
    end
    `TB_FINISH
  end
endmodule

// Testbench for sc_preamble_adder. A header model (a 16-bit LFSR,
// x^16+x^14+x^13+x^11+1 from 0xACE1, two bits per QPSK symbol) gives the
// expected 234-word header: 10-word cyclic prefix of the preamble, the
// 32-word preamble half twice, 32-word prefix of the channel-estimation
// pilots, 128 pilots. The 1632 data words follow without a gap.
`include "tb/tb_util.svh"
module tb_sc_preamble_adder;
  `TB_COUNTERS
  localparam int HDR = 234, NDATA = 1632;
  localparam logic signed [15:0] A = 16'sd11585;
  logic clk = 0, sclr = 1, start_transmit = 0, din_valid = 0, vd_out;
  logic signed [15:0] din_i = 0, din_q = 0, dout_i, dout_q;
  logic [31:0] data [NDATA];
  logic [31:0] seq [160];
  logic [31:0] hdr [HDR];
  int nout, cyc = 0, first_out, last_out, st_cyc;
  always #5 clk = ~clk;
  sc_preamble_adder dut (.*);
  `TB_WATCHDOG(20000)
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (vd_out) begin
      if (nout == 0) first_out = cyc;
      last_out = cyc;
      if (nout < HDR) `CHECK({dout_i, dout_q} == hdr[nout], $sformatf("header word %0d", nout))
      else            `CHECK({dout_i, dout_q} == data[nout - HDR], $sformatf("data word %0d", nout - HDR))
      nout++;
    end
  end
  initial begin
    static logic [15:0] lf = 16'hACE1;
    logic b [320];
    for (int j = 0; j < 320; j++) begin
      b[j] = lf[0];
      lf = {lf[14:0], lf[15] ^ lf[13] ^ lf[12] ^ lf[10]};
    end
    for (int n = 0; n < 160; n++) seq[n] = {b[2*n] ? -A : A, b[2*n+1] ? -A : A};
    for (int k = 0; k < 10; k++)  hdr[k] = seq[22 + k];
    for (int k = 0; k < 64; k++)  hdr[10 + k] = seq[k % 32];
    for (int k = 0; k < 32; k++)  hdr[74 + k] = seq[32 + 96 + k];
    for (int k = 0; k < 128; k++) hdr[106 + k] = seq[32 + k];
    repeat (3) @(posedge clk);
    @(negedge clk) sclr = 0;
    for (int f = 0; f < 2; f++) begin
      for (int k = 0; k < NDATA; k++) data[k] = $urandom;
      nout = 0;
      repeat (10) @(negedge clk);
      start_transmit = 1; st_cyc = cyc; @(negedge clk); start_transmit = 0;
      for (int k = 0; k < NDATA; k++) begin
        {din_i, din_q} = data[k]; din_valid = 1; @(negedge clk);
      end
      din_valid = 0;
      repeat (HDR + 10) @(negedge clk);
      `CHECK(nout == HDR + NDATA, "1866 words")
      `CHECK(last_out - first_out == HDR + NDATA - 1, "no gap")
      `CHECK(first_out == st_cyc + 2, "header starts two cycles after start")
    end
    `TB_FINISH
  end
endmodule

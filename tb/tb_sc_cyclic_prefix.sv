// Testbench for sc_cyclic_prefix. A model of the previous stage answers each
// take_out cycle with the next word one cycle later. The output must be one
// contiguous stream of 3 x (32 + 512) words: for each symbol its last 32
// words, then all 512; send_out pulses one cycle before the first word.
`include "tb/tb_util.svh"
module tb_sc_cyclic_prefix;
  `TB_COUNTERS
  localparam int NFFT = 512, CP = 32, NSYM = 3;
  logic clk = 0, sclr = 1, send_in = 0, din_valid = 0;
  logic take_out, send_out, dout_valid;
  logic signed [15:0] din_i = 0, din_q = 0, dout_i, dout_q;
  logic [31:0] sym [NSYM][NFFT];
  int nin, nout, cyc = 0, so_cyc, first_out, last_out, nso;
  always #5 clk = ~clk;
  sc_cyclic_prefix dut (.*);
  `TB_WATCHDOG(20000)
  // previous stage: one word per take, registered
  always @(posedge clk) begin
    cyc <= cyc + 1;
    din_valid <= take_out;
    if (take_out) begin
      {din_i, din_q} <= sym[nin / NFFT][nin % NFFT];
      nin <= nin + 1;
    end
    if (send_out) begin so_cyc = cyc; nso++; end
    if (dout_valid) begin
      int s, p;
      if (nout == 0) first_out = cyc;
      last_out = cyc;
      s = nout / (NFFT + CP); p = nout % (NFFT + CP);
      `CHECK({dout_i, dout_q} == sym[s][p < CP ? NFFT - CP + p : p - CP],
             $sformatf("symbol %0d position %0d", s, p))
      nout++;
    end
  end
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) sclr = 0;
    for (int f = 0; f < 2; f++) begin
      for (int s = 0; s < NSYM; s++)
        for (int k = 0; k < NFFT; k++) sym[s][k] = $urandom;
      nin = 0; nout = 0; nso = 0;
      send_in = 1; @(negedge clk); send_in = 0;
      repeat (NSYM * (NFFT + CP) + NFFT + 50) @(negedge clk);
      `CHECK(nin == NSYM * NFFT, "three symbols taken")
      `CHECK(nout == NSYM * (NFFT + CP), "three symbols with prefix sent")
      `CHECK(last_out - first_out == nout - 1, "output contiguous")
      `CHECK(nso == 1 && so_cyc == first_out - 1, "send_out one cycle before data")
    end
    `TB_FINISH
  end
endmodule

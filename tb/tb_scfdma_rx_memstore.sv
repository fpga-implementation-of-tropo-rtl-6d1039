// Testbench for scfdma_rx_memstore. A random sample stream is written from
// reset; two frames are released from different locations, the second after
// the write address has wrapped. Checked: the 128 channel-estimation samples
// start right after the 32-sample prefix and come out in one burst; each of
// the 3 symbols goes to the FFT in one burst of 512 with its prefix skipped
// and the first sample marked; the FFT results are passed on in order; done
// pulses once per frame. A stand-in for the FFT core returns, after a delay,
// the symbol reversed and negated, so order and values are both visible.
`include "tb/tb_util.svh"
module tb_scfdma_rx_memstore;
  `TB_COUNTERS
  localparam int AW = 11, CP = 32, CEM = 128, NFFT = 512, NSYM = 3, NS = 6000;
  logic clk = 0, sclr = 1, enable = 0, fft_start = 0, fft_ready = 0;
  logic signed [15:0] din_r, din_i, fft_out_r = 0, fft_out_i = 0;
  logic [AW-1:0] location = 0;
  logic signed [15:0] cem_r, cem_i, fft_in_r, fft_in_i, out_r, out_i;
  logic cem_valid, fft_in_valid, fft_in_first, out_valid, done;
  int sr [NS], si [NS];
  int n = 0, loc;                 // stream index; location as a stream index
  int ncem, nin, nout, ndone, nfirst, cem_bursts, in_bursts, out_bursts;
  bit prev_cem, prev_in, prev_out;
  int buf_r [NFFT], buf_i [NFFT];
  always #5 clk = ~clk;
  scfdma_rx_memstore #(.AW(AW)) dut (.*);
  `TB_WATCHDOG(20000)

  // stream: sample n is on the inputs during cycle n after reset
  assign din_r = 16'(sr[n % NS]);
  assign din_i = 16'(si[n % NS]);
  always @(posedge clk) if (!sclr) n <= n + 1;

  always @(posedge clk) if (!sclr) begin
    if (cem_valid) begin
      `CHECK(int'(cem_r) == sr[loc + CP + ncem] && int'(cem_i) == si[loc + CP + ncem],
             $sformatf("pilot sample %0d", ncem))
      ncem++;
    end
    if (fft_in_valid) begin
      int s, k;
      s = nin / NFFT; k = nin % NFFT;
      `CHECK(int'(fft_in_r) == sr[loc + CP + CEM + s * (CP + NFFT) + CP + k] &&
             int'(fft_in_i) == si[loc + CP + CEM + s * (CP + NFFT) + CP + k],
             $sformatf("symbol %0d sample %0d into the FFT", s, k))
      `CHECK(fft_in_first == (k == 0), "first-sample mark")
      buf_r[k] = -int'(fft_in_r); buf_i[k] = -int'(fft_in_i);
      nin++;
    end
    if (fft_in_first) nfirst++;
    if (out_valid) begin
      int k;
      k = nout % NFFT;
      `CHECK(int'(out_r) == buf_r[NFFT - 1 - k] && int'(out_i) == buf_i[NFFT - 1 - k],
             $sformatf("result %0d", nout))
      nout++;
    end
    if (done) begin
      ndone++;
      `CHECK(nout == NSYM * NFFT, "done after the last result")
    end
    if (prev_cem && !cem_valid) cem_bursts++;
    if (prev_in && !fft_in_valid) in_bursts++;
    if (prev_out && !out_valid) out_bursts++;
    prev_cem = cem_valid; prev_in = fft_in_valid; prev_out = out_valid;
  end

  // FFT stand-in: 40 cycles after the last input, ready for one cycle, then
  // the 512 results on consecutive cycles
  int got = 0;                    // samples the stand-in has taken in
  initial forever begin
    @(negedge clk);
    if (fft_in_valid) got++;
    if (got == NFFT) begin
      got = 0;
      repeat (40) @(negedge clk);
      fft_ready = 1;
      @(negedge clk) fft_ready = 0;
      for (int k = 0; k < NFFT; k++) begin
        fft_out_r = 16'(buf_r[NFFT - 1 - k]); fft_out_i = 16'(buf_i[NFFT - 1 - k]);
        @(negedge clk);
      end
      fft_out_r = 0; fft_out_i = 0;
    end
  end

  task automatic run_frame(input int l, input int wait_start);
    loc = l; ncem = 0; nin = 0; nout = 0; ndone = 0; nfirst = 0;
    cem_bursts = 0; in_bursts = 0; out_bursts = 0;
    wait (n >= l + 5);
    @(negedge clk) begin enable = 1; location = AW'(l); end
    @(negedge clk) enable = 0;
    repeat (wait_start) @(negedge clk);
    `CHECK(ncem == CEM && cem_bursts == 1, $sformatf("one burst of %0d pilots (%0d)", CEM, ncem))
    fft_start = 1;
    @(negedge clk) fft_start = 0;
    wait (ndone == 1);
    repeat (5) @(negedge clk);
    `CHECK(nin == NSYM * NFFT && in_bursts == NSYM && nfirst == NSYM, "three bursts into the FFT")
    `CHECK(nout == NSYM * NFFT && out_bursts == NSYM, "three bursts of results")
    `CHECK(ndone == 1, "one done pulse")
  endtask

  initial begin
    for (int i = 0; i < NS; i++) begin
      sr[i] = $urandom_range(65535) - 32768; si[i] = $urandom_range(65535) - 32768;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) sclr = 0;
    run_frame(100, 200);
    run_frame(3500, 130);       // location 3500 wraps to 1452 in the buffer
    `TB_FINISH
  end
endmodule

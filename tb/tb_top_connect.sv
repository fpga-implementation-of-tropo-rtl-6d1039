// Testbench for top_connect: two received OFDM frames with different carrier
// frequency offsets, separated by random samples. For each frame the receiver
// must detect the preamble once and deliver 9 bursts of 512 samples with
// 64-cycle gaps. Sample k of symbol s must equal the transmitted sample
// rotated by one constant phase (the offset's phase at the first data
// sample): the frequency offset is removed and the cyclic prefixes skipped.
`include "tb/tb_util.svh"
module tb_top_connect;
  `TB_COUNTERS
  `include "tb/ofdm_gen.svh"
  logic clk = 0, sclr = 1, rdy, packet, frame_done;
  logic signed [15:0] rx_r = 0, rx_i = 0, data_out_final_r, data_out_final_i;
  logic [15:0] threshold = 16'd45875;
  int nout, npk, ndone, blen, gap, bursts, worst;
  bit prev_rdy;
  real psi, cr, ci;
  always #5 clk = ~clk;
  top_connect dut (.*);
  `TB_WATCHDOG(40000)
  always @(posedge clk) if (!sclr) begin
    if (packet) npk++;
    if (frame_done) ndone++;
    if (rdy) begin
      int s, k, er, ei, dr, di;
      s = nout / GEN_NFFT; k = nout % GEN_NFFT;
      er = int'(sym_r[s][k] * cr - sym_i[s][k] * ci);
      ei = int'(sym_r[s][k] * ci + sym_i[s][k] * cr);
      dr = int'(data_out_final_r) - er; di = int'(data_out_final_i) - ei;
      if (dr < 0) dr = -dr;
      if (di < 0) di = -di;
      if (dr > worst) worst = dr;
      if (di > worst) worst = di;
      `CHECK(dr <= 8 && di <= 8, $sformatf("symbol %0d sample %0d: got %0d,%0d want %0d,%0d",
             s, k, data_out_final_r, data_out_final_i, er, ei))
      if (!prev_rdy && nout > 0) `CHECK(gap == 64, "64-cycle gap between symbols")
      nout++; blen++; gap = 0;
    end else begin
      if (prev_rdy) begin `CHECK(blen == GEN_NFFT, "burst of 512"); bursts++; end
      blen = 0; gap++;
    end
    prev_rdy = rdy;
  end
  initial begin
    static real om [2] = '{0.003, -0.0061};
    repeat (3) @(posedge clk);
    @(negedge clk) sclr = 0;
    foreach (om[f]) begin
      gen_frame(200, 400, 4000, om[f], 1.0 + f);
      psi = om[f] * first_data + 1.0 + f;
      cr = $cos(psi); ci = $sin(psi);
      nout = 0; npk = 0; ndone = 0; bursts = 0; worst = 0;
      for (int n = 0; n < rx_r_q.size(); n++) begin
        rx_r = 16'(rx_r_q[n]); rx_i = 16'(rx_i_q[n]);
        @(negedge clk);
      end
      rx_r = 0; rx_i = 0;
      repeat (300) @(negedge clk);
      `CHECK(npk == 1, "one detection per frame")
      `CHECK(ndone == 1, "frame_done once")
      `CHECK(nout == 9 * GEN_NFFT && bursts == 9, $sformatf("nine symbols delivered (%0d)", nout))
      $display("frame %0d: offset %f, worst error %0d LSB", f, om[f], worst);
    end
    `TB_FINISH
  end
endmodule

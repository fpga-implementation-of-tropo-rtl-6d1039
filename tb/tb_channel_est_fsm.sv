// Testbench for channel_est_fsm: a 4864-sample corrected frame whose samples
// carry their own index. Expected output: 9 bursts of 512 samples, 64 idle
// cycles between bursts, the first burst 65 cycles after the frame starts,
// symbol s sample k equal to input index 544*s + k (cyclic prefixes removed).
// Two frames are sent to check that the block re-arms.
`include "tb/tb_util.svh"
module tb_channel_est_fsm;
  `TB_COUNTERS
  localparam int FRAME = 4864;
  logic clk = 0, sclr = 1, channel_enable = 0, rdy;
  logic signed [15:0] din_r, din_i, data_out_final_r, data_out_final_i;
  int cyc = 0, idx = 0, rise, nrdy, first_rdy, bursts, blen, gap, after_end;
  bit prev_rdy;
  always #5 clk = ~clk;
  channel_est_fsm dut (.clk, .sclr, .data_out_freq_r(din_r), .data_out_freq_i(din_i),
    .channel_enable, .data_out_final_r, .data_out_final_i, .rdy);
  assign din_r = 16'(idx);
  assign din_i = 16'(idx * 7 + 3);
  `TB_WATCHDOG(30000)
  always @(posedge clk) if (!sclr) begin
    cyc <= cyc + 1;
    if (rdy) begin
      int s, k, e;
      if (nrdy == 0) first_rdy = cyc;
      s = nrdy / 512; k = nrdy % 512; e = 544 * s + k;
      `CHECK(data_out_final_r == 16'(e) && data_out_final_i == 16'(e * 7 + 3),
             $sformatf("symbol %0d sample %0d", s, k))
      if (!prev_rdy && nrdy > 0) `CHECK(gap == 64, $sformatf("gap before symbol %0d is %0d", s, gap))
      if (!channel_enable) after_end++;
      nrdy++; blen++; gap = 0;
    end else begin
      if (prev_rdy) begin `CHECK(blen == 512, "burst of 512"); bursts++; end
      blen = 0; gap++;
    end
    prev_rdy = rdy;
  end
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) sclr = 0;
    for (int f = 0; f < 2; f++) begin
      nrdy = 0; bursts = 0; blen = 0; gap = 0; after_end = 0;
      repeat (20) @(negedge clk);
      idx = 0; channel_enable = 1; rise = cyc;
      for (int n = 0; n < FRAME; n++) begin
        @(negedge clk);
        idx++;
      end
      channel_enable = 0;
      repeat (600) @(negedge clk);
      `CHECK(nrdy == 9 * 512, "all nine symbols read")
      `CHECK(bursts == 9, "nine bursts")
      `CHECK(first_rdy == rise + 65, "first output after the 64-cycle wait")
      `CHECK(after_end > 0, "last symbol read after the frame input ended")
    end
    `TB_FINISH
  end
endmodule

// Testbench for top_fsm: one received frame. Checks that the buffered
// samples come out from the first sample after the first cyclic prefix for
// 4864 consecutive cycles, that freq_enable rises 22 cycles (the latency of
// freq_correct) before the first sample and lasts as long, that the phase
// equals -32 times the frequency offset, and that frame_done pulses once.
`include "tb/tb_util.svh"
module tb_top_fsm;
  `TB_COUNTERS
  `include "tb/ofdm_gen.svh"
  localparam int FRAME = 4864;
  logic clk = 0, sclr = 1, data_valid, freq_enable, packet, frame_done;
  logic signed [15:0] rx_r = 0, rx_i = 0, data_r, data_i;
  logic [15:0] threshold = 16'd45875;
  logic signed [31:0] phase;
  logic [7:0] location;
  int cyc = 0, nv, nfe, fe_rise, dv_rise, dv_last, ndone, npk;
  real got;
  always #5 clk = ~clk;
  top_fsm dut (.*);
  `TB_WATCHDOG(20000)
  always @(posedge clk) if (!sclr) begin
    cyc <= cyc + 1;
    if (packet) npk++;
    if (frame_done) ndone++;
    if (freq_enable) begin if (nfe == 0) fe_rise = cyc; nfe++; end
    if (data_valid) begin
      if (nv == 0) dv_rise = cyc;
      dv_last = cyc;
      `CHECK(data_r == 16'(rx_r_q[first_data + nv]) && data_i == 16'(rx_i_q[first_data + nv]),
             $sformatf("buffered sample %0d", nv))
      nv++;
    end
  end
  initial begin
    gen_frame(150, 300, 4000, 0.0045, 0.2);
    repeat (3) @(posedge clk);
    @(negedge clk) sclr = 0;
    for (int n = 0; n < rx_r_q.size(); n++) begin
      rx_r = 16'(rx_r_q[n]); rx_i = 16'(rx_i_q[n]);
      @(negedge clk);
    end
    repeat (100) @(negedge clk);
    `CHECK(npk == 1, "one detection")
    `CHECK(nv == FRAME && dv_last - dv_rise == FRAME - 1, "4864 consecutive samples")
    `CHECK(nfe == FRAME && dv_rise - fe_rise == 22, "freq_enable leads the data by 22 cycles")
    `CHECK(ndone == 1, "frame_done once")
    got = real'(phase) / 536870912.0;
    `CHECK(got + 32 * 0.0045 < 1e-4 && got + 32 * 0.0045 > -1e-4, "phase estimate")
    `TB_FINISH
  end
endmodule

// Testbench for topfsm_ctrl: cycle-exact sequence after a packet: clr next
// cycle, freq_enable VLAT cycles later for FRAME cycles, memstore read FC_LAT-1
// cycles after freq_enable for FRAME cycles, frame_done at the end; packets
// during a frame are ignored.
`include "tb/tb_util.svh"
module tb_topfsm_ctrl;
  `TB_COUNTERS
  localparam int VLAT = 21, FC_LAT = 22, FRAME = 4864;
  logic clk = 0, sclr = 1, packet = 0;
  logic clr, freq_enable, mem_rd_en, frame_done;
  int cyc = 0, p, fe_rise = -1, fe_len = 0, rd_rise = -1, rd_len = 0, clr_at = -1, done_at = -1, nclr = 0;
  always #5 clk = ~clk;
  topfsm_ctrl #(.VLAT(VLAT), .FC_LAT(FC_LAT), .FRAME(FRAME)) dut (.*);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (clr) begin clr_at = cyc; nclr++; end
    if (freq_enable) begin if (fe_rise < 0) fe_rise = cyc; fe_len++; end
    if (mem_rd_en) begin if (rd_rise < 0) rd_rise = cyc; rd_len++; end
    if (frame_done) done_at = cyc;
  end
  `TB_WATCHDOG(20000)
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) sclr = 0;
    repeat (10) @(negedge clk);
    packet = 1; p = cyc; @(negedge clk) packet = 0;
    repeat (100) @(negedge clk);
    packet = 1; @(negedge clk) packet = 0;     // ignored
    repeat (FRAME + 100) @(negedge clk);
    `CHECK(clr_at == p + 1 && nclr == 1, "clr one cycle after packet, once")
    `CHECK(fe_rise == p + VLAT + 1, "freq_enable after CORDIC latency")
    `CHECK(fe_len == FRAME, "freq_enable length")
    `CHECK(rd_rise == fe_rise + FC_LAT - 1, "read start aligned to sine/cosine")
    `CHECK(rd_len == FRAME, "read length")
    `CHECK(done_at == rd_rise + FRAME, "frame_done after the frame")
    `TB_FINISH
  end
endmodule

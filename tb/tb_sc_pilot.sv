// Testbench for sc_pilot. The previous stage delivers 1440 data symbols after
// the take_out pulse; the next stage takes three symbols of 512 words with
// pauses between them (as the cyclic-prefix stage does). Every 16th position
// of a symbol, starting at 0, must carry the pilot (+A, -A); the other
// positions carry the data in order. dout_valid follows take_in by one cycle.
`include "tb/tb_util.svh"
module tb_sc_pilot;
  `TB_COUNTERS
  localparam int NDATA = 1440, NFFT = 512;
  localparam logic signed [15:0] A = 16'sd11585;
  logic clk = 0, sclr = 1, send_in = 0, din_valid = 0, take_in = 0;
  logic take_out, send_out, dout_valid;
  logic signed [15:0] din_i = 0, din_q = 0, dout_i, dout_q;
  logic [31:0] sent [$];
  int nout, nd, npilot;
  bit take_d = 0;
  always #5 clk = ~clk;
  sc_pilot dut (.*);
  `TB_WATCHDOG(20000)
  always @(posedge clk) begin
    `CHECK(dout_valid == take_d, "valid one cycle after take")
    take_d <= take_in;
    if (dout_valid) begin
      if (nout % NFFT % 16 == 0) begin
        `CHECK(dout_i == A && dout_q == -A, $sformatf("pilot at %0d", nout));
        npilot++;
      end else begin
        `CHECK({dout_i, dout_q} == sent[nd], $sformatf("data at %0d", nout));
        nd++;
      end
      nout++;
    end
  end
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) sclr = 0;
    for (int f = 0; f < 2; f++) begin
      sent.delete(); nout = 0; nd = 0; npilot = 0;
      send_in = 1;
      while (!take_out) @(negedge clk);
      send_in = 0;
      fork
        begin
          @(negedge clk);
          for (int n = 0; n < NDATA; n++) begin
            din_i = 16'($urandom); din_q = 16'($urandom); din_valid = 1;
            sent.push_back({din_i, din_q});
            @(negedge clk);
          end
          din_valid = 0;
        end
        begin
          while (!send_out) @(negedge clk);
          repeat (3 * f) @(negedge clk);
          for (int s = 0; s < 3; s++) begin
            take_in = 1; repeat (NFFT) @(negedge clk);
            take_in = 0; repeat (32) @(negedge clk);
          end
        end
      join
      repeat (5) @(negedge clk);
      `CHECK(nout == 3 * NFFT && npilot == 96 && nd == NDATA, "three symbols of 512")
    end
    `TB_FINISH
  end
endmodule

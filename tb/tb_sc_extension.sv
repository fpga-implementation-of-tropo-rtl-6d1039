// Testbench for sc_extension. Two bursts of 1152 symbols: the first is taken
// by the next stage as soon as send_out rises (output overlaps input), the
// second only after the whole burst is stored. Each output must be 1440
// consecutive words: the 1152 inputs in order, then the pad symbol.
`include "tb/tb_util.svh"
module tb_sc_extension;
  `TB_COUNTERS
  localparam int N_IN = 1152, N_OUT = 1440;
  localparam logic signed [15:0] A = 16'sd11585;
  logic clk = 0, sclr = 1, send_in = 0, din_valid = 0, take_in = 0;
  logic take_out, send_out, dout_valid;
  logic signed [15:0] din_i = 0, din_q = 0, dout_i, dout_q;
  logic [31:0] sent [$];
  int nout, first_out, last_out, cyc = 0, npad;
  always #5 clk = ~clk;
  sc_extension dut (.*);
  `TB_WATCHDOG(20000)
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dout_valid) begin
      if (nout == 0) first_out = cyc;
      last_out = cyc;
      if (nout < N_IN) `CHECK({dout_i, dout_q} == sent[nout], $sformatf("data word %0d", nout))
      else begin
        `CHECK(dout_i == A && dout_q == A, $sformatf("pad word %0d", nout));
        npad++;
      end
      nout++;
    end
  end
  task automatic burst(input bit early);
    sent.delete(); nout = 0; npad = 0;
    @(negedge clk) send_in = 1;
    while (!take_out) @(negedge clk);
    send_in = 0;
    fork
      for (int n = 0; n < N_IN; n++) begin
        din_i = 16'($urandom); din_q = 16'($urandom); din_valid = 1;
        sent.push_back({din_i, din_q});
        @(negedge clk);
      end
      begin
        if (!early) repeat (N_IN + 20) @(negedge clk);
        while (!send_out) @(negedge clk);
        take_in = 1; @(negedge clk); take_in = 0;
      end
    join
    din_valid = 0;
    repeat (N_OUT + 10) @(negedge clk);
    `CHECK(nout == N_OUT && npad == N_OUT - N_IN, "1440 words out")
    `CHECK(last_out - first_out == N_OUT - 1, "output is contiguous")
    `CHECK(!send_out, "send_out cleared after the burst")
  endtask
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) sclr = 0;
    burst(1);
    burst(0);
    `TB_FINISH
  end
endmodule

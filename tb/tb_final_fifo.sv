// Testbench for final_fifo: decoder words with random soft bits around the
// three hard-decision bits (20, 13, 6). A reference packs 8 words into 24
// bits, splits them into three bytes, most significant first, and XORs each
// with the bit-reversed low byte of a 64-bit LFSR modelled here. The
// threshold flag must be low at 24 stored bytes and high at 33; all bytes are
// then read back in order.
`include "tb/tb_util.svh"
module tb_final_fifo;
  `TB_COUNTERS
  localparam int GROUPS = 64;
  logic clk = 0, sclr = 1, input_valid = 0, rd_en = 0, output_valid, full, empty;
  logic [20:0] dout_ldpc = 0;
  logic [7:0] dout;
  logic [7:0] exp_q [$];
  logic [63:0] st = 64'hACE1_2468_1357_9BDF;
  int nread = 0;
  always #5 clk = ~clk;
  final_fifo dut (.*);
  function automatic logic [7:0] rev8(input logic [7:0] b);
    for (int i = 0; i < 8; i++) rev8[i] = b[7-i];
  endfunction
  `TB_WATCHDOG(20000)
  always @(posedge clk) if (!sclr && output_valid) begin
    `CHECK(exp_q.size() > 0 && dout == exp_q.pop_front(), $sformatf("byte %0d", nread))
    nread++;
  end
  initial begin
    logic [23:0] bits;
    repeat (3) @(posedge clk);
    @(negedge clk) sclr = 0;
    `CHECK(empty && !full, "empty after reset")
    for (int g = 0; g < GROUPS; g++) begin
      bits = 24'($urandom);
      for (int w = 0; w < 8; w++) begin
        while (($urandom % 4) == 0) begin input_valid = 0; @(negedge clk); end
        dout_ldpc = 21'($urandom);
        dout_ldpc[20] = bits[23 - 3*w];
        dout_ldpc[13] = bits[22 - 3*w];
        dout_ldpc[6]  = bits[21 - 3*w];
        input_valid = 1;
        @(negedge clk);
      end
      input_valid = 0;
      for (int b = 0; b < 3; b++) begin
        exp_q.push_back(bits[23 - 8*b -: 8] ^ rev8(st[7:0]));
        st = {st[62:0], st[63] ^ st[62] ^ st[60] ^ st[59]};
      end
      if (g == 7) begin
        repeat (6) @(negedge clk);
        `CHECK(!full && !empty, "24 bytes: below threshold");
      end
      if (g == 10) begin
        repeat (6) @(negedge clk);
        `CHECK(full, "33 bytes: threshold flag");
      end
    end
    repeat (6) @(negedge clk);
    rd_en = 1;
    repeat (3 * GROUPS + 4) @(negedge clk);
    rd_en = 0;
    `CHECK(nread == 3 * GROUPS, "all bytes read")
    `CHECK(empty && !full, "empty at the end")
    `TB_FINISH
  end
endmodule

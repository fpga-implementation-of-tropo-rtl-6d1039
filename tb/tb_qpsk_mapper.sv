// Testbench for qpsk_mapper: the four constellation points.
`include "tb/tb_util.svh"
module tb_qpsk_mapper;
  `TB_COUNTERS
  logic [1:0] bits;
  logic signed [15:0] i_o, q_o;
  qpsk_mapper dut (.*);
  initial begin
    bits = 2'b00; #1; `CHECK(i_o ==  11585 && q_o ==  11585, "00")
    bits = 2'b01; #1; `CHECK(i_o == -11585 && q_o ==  11585, "01")
    bits = 2'b11; #1; `CHECK(i_o == -11585 && q_o == -11585, "11")
    bits = 2'b10; #1; `CHECK(i_o ==  11585 && q_o == -11585, "10")
    `TB_FINISH
  end
endmodule

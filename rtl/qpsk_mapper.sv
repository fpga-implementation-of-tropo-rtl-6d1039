// qpsk_mapper: maps two bits s1 s0 to a QPSK point of amplitude 1/sqrt(2)
// (2.14 format): 00 -> (+,+), 01 -> (-,+), 11 -> (-,-), 10 -> (+,-); s0 sets
// the sign of I, s1 the sign of Q. Combinational, no handshake.
module qpsk_mapper #(
  parameter int DW = 16,
  parameter logic signed [DW-1:0] AMP = modem_pkg::QPSK_AMP
) (
  input  logic [1:0]           bits,
  output logic signed [DW-1:0] i_o,
  output logic signed [DW-1:0] q_o
);
  assign i_o = bits[0] ? -AMP : AMP;
  assign q_o = bits[1] ? -AMP : AMP;
endmodule

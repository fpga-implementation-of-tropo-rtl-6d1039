// scfdma_tx: SC-FDMA transmitter after the LDPC encoder.
//   encoder bits -> qpsk_mapper -> sc_extension (1152 -> 1440 symbols)
//   -> sc_pilot (3 symbols of 512 with 32 pilots each)
//   -> sc_cyclic_prefix (32-word CP per symbol)
//   -> sc_preamble_adder (234-word header) -> frame of 1866 I/Q words.
// Adjacent stages use the send/take handshake: a stage with data raises
// send_out, the next stage answers with take; data then flows with a valid.
// The encoder side: it raises enc_send; after enc_take it delivers 1152 bit
// pairs on consecutive cycles with enc_valid.
module scfdma_tx #(
  parameter int DW = 16
) (
  input  logic                 clk,
  input  logic                 sclr,
  input  logic                 enc_send,
  output logic                 enc_take,
  input  logic [1:0]           enc_bits,
  input  logic                 enc_valid,
  output logic signed [DW-1:0] tx_i,
  output logic signed [DW-1:0] tx_q,
  output logic                 tx_valid
);
  logic signed [DW-1:0] q_i, q_q, e_i, e_q, p_i, p_q, c_i, c_q;
  logic e_send, e_take, e_valid, p_send, p_take, p_valid, c_send, c_valid;

  qpsk_mapper #(.DW(DW)) u_map (.bits(enc_bits), .i_o(q_i), .q_o(q_q));

  sc_extension #(.DW(DW)) u_ext (
    .clk, .sclr, .send_in(enc_send), .take_out(enc_take),
    .din_i(q_i), .din_q(q_q), .din_valid(enc_valid),
    .send_out(e_send), .take_in(e_take), .dout_i(e_i), .dout_q(e_q), .dout_valid(e_valid));

  sc_pilot #(.DW(DW)) u_pilot (
    .clk, .sclr, .send_in(e_send), .take_out(e_take),
    .din_i(e_i), .din_q(e_q), .din_valid(e_valid),
    .send_out(p_send), .take_in(p_take), .dout_i(p_i), .dout_q(p_q), .dout_valid(p_valid));

  sc_cyclic_prefix #(.DW(DW)) u_cp (
    .clk, .sclr, .send_in(p_send), .take_out(p_take),
    .din_i(p_i), .din_q(p_q), .din_valid(p_valid),
    .send_out(c_send), .dout_i(c_i), .dout_q(c_q), .dout_valid(c_valid));

  sc_preamble_adder #(.DW(DW)) u_pre (
    .clk, .sclr, .start_transmit(c_send), .din_i(c_i), .din_q(c_q), .din_valid(c_valid),
    .dout_i(tx_i), .dout_q(tx_q), .vd_out(tx_valid));
endmodule

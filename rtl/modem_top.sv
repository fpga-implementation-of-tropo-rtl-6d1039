// modem_top: the digital parts of the tropo-scatter modem that are specified
// well enough to build, side by side:
//  * OFDM receiver front end (top_connect): preamble detection, frequency
//    offset estimation and correction, and the bursts towards channel
//    estimation (ce_*). Channel estimation/correction itself is external.
//  * MIMO interface (mimo_combiner): the channel-corrected streams of four
//    receive chains (cc_*) are aligned and combined for the LDPC decoder
//    (ldpc_*). The decoder is external.
//  * Output interface (final_fifo): decoder LLR words (dec_*) to descrambled
//    message bytes (byte_*).
//  * SC-FDMA transmitter (scfdma_tx): encoder bit pairs (enc_*) to a complete
//    1866-word frame (tx_*).
//  * SC-FDMA receiver input buffer (scfdma_rx_memstore): stores the received
//    stream (sc_rx_*), releases the channel-estimation pilots (sc_cem_*) when
//    told where the preamble ended, then each data symbol to an external FFT
//    core (sc_fft_*) and its results (sc_sym_*). Preamble detection, the FFT
//    and SC-FDMA channel estimation/correction are external.
// All run on one clock (20 MHz sample rate) with synchronous reset sclr.
module modem_top (
  input  logic                        clk,
  input  logic                        sclr,
  // OFDM receiver input
  input  logic signed [15:0]          rx_r,
  input  logic signed [15:0]          rx_i,
  input  logic        [15:0]          threshold,
  output logic signed [15:0]          ce_r,
  output logic signed [15:0]          ce_i,
  output logic                        ce_valid,
  output logic                        packet,
  output logic                        frame_done,
  // channel-corrected streams of four chains
  input  logic [3:0]                  cc_valid,
  input  logic signed [15:0]          cc_r [4],
  input  logic signed [15:0]          cc_i [4],
  input  logic [3:0]                  rx_chan_en,
  output logic signed [15:0]          ldpc_r,
  output logic signed [15:0]          ldpc_i,
  output logic                        ldpc_valid,
  output logic [3:0]                  chains_active,
  // LDPC decoder output
  input  logic [20:0]                 dec_llr,
  input  logic                        dec_valid,
  input  logic                        byte_rd,
  output logic [7:0]                  byte_out,
  output logic                        byte_valid,
  output logic                        bytes_ready,
  output logic                        bytes_empty,
  // SC-FDMA transmitter
  input  logic                        enc_send,
  output logic                        enc_take,
  input  logic [1:0]                  enc_bits,
  input  logic                        enc_valid,
  output logic signed [15:0]          tx_i,
  output logic signed [15:0]          tx_q,
  output logic                        tx_valid,
  // SC-FDMA receiver input buffer
  input  logic signed [15:0]          sc_rx_r,
  input  logic signed [15:0]          sc_rx_i,
  input  logic                        sc_rx_enable,
  input  logic        [10:0]          sc_rx_location,
  input  logic                        sc_fft_start,
  output logic signed [15:0]          sc_cem_r,
  output logic signed [15:0]          sc_cem_i,
  output logic                        sc_cem_valid,
  output logic signed [15:0]          sc_fft_in_r,
  output logic signed [15:0]          sc_fft_in_i,
  output logic                        sc_fft_in_valid,
  output logic                        sc_fft_in_first,
  input  logic                        sc_fft_ready,
  input  logic signed [15:0]          sc_fft_out_r,
  input  logic signed [15:0]          sc_fft_out_i,
  output logic signed [15:0]          sc_sym_r,
  output logic signed [15:0]          sc_sym_i,
  output logic                        sc_sym_valid,
  output logic                        sc_rx_done
);
  top_connect u_rx (
    .clk, .sclr, .rx_r, .rx_i, .threshold,
    .data_out_final_r(ce_r), .data_out_final_i(ce_i), .rdy(ce_valid),
    .packet, .frame_done);

  mimo_combiner u_mimo (
    .clk, .sclr, .in_valid(cc_valid), .in_r(cc_r), .in_i(cc_i), .rx_valid(rx_chan_en),
    .out_r(ldpc_r), .out_i(ldpc_i), .out_valid(ldpc_valid), .active(chains_active));

  final_fifo u_out (
    .clk, .sclr, .dout_ldpc(dec_llr), .input_valid(dec_valid), .rd_en(byte_rd),
    .dout(byte_out), .output_valid(byte_valid), .full(bytes_ready), .empty(bytes_empty));

  scfdma_tx u_tx (
    .clk, .sclr, .enc_send, .enc_take, .enc_bits, .enc_valid, .tx_i, .tx_q, .tx_valid);

  scfdma_rx_memstore u_sc_rx (
    .clk, .sclr, .din_r(sc_rx_r), .din_i(sc_rx_i), .enable(sc_rx_enable),
    .location(sc_rx_location), .fft_start(sc_fft_start),
    .cem_r(sc_cem_r), .cem_i(sc_cem_i), .cem_valid(sc_cem_valid),
    .fft_in_r(sc_fft_in_r), .fft_in_i(sc_fft_in_i), .fft_in_valid(sc_fft_in_valid),
    .fft_in_first(sc_fft_in_first), .fft_ready(sc_fft_ready),
    .fft_out_r(sc_fft_out_r), .fft_out_i(sc_fft_out_i),
    .out_r(sc_sym_r), .out_i(sc_sym_i), .out_valid(sc_sym_valid), .done(sc_rx_done));
endmodule

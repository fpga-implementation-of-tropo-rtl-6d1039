// sc_preamble_adder: last SC-FDMA transmitter stage. Puts the frame header in
// front of the data stream of the cyclic-prefix stage:
//   [preamble CP (PRE_CP)] [preamble: 32-word sequence sent twice]
//   [CE-pilot CP (CE_CP)] [channel-estimation pilots (CE_LEN)]
// HDR = 10 + 64 + 32 + 128 = 234 words. When start_transmit (the previous
// stage's send_out) is seen, the data arrives from the next cycle on; it goes
// into a HDR-deep register delay line while the header is sent, and then
// leaves the delay line directly behind the header, so the frame of
// HDR + NDATA = 1866 words comes out without a gap (vd_out high, registered).
// The header sequences are not published; here they are QPSK symbols drawn
// from a 16-bit LFSR (x^16+x^14+x^13+x^11+1, seed 0xACE1), two bits per
// symbol, preamble first, and the table is computed at elaboration.
module sc_preamble_adder #(
  parameter int DW     = 16,
  parameter int PRE_CP = 10,
  parameter int HALF   = 32,
  parameter int CE_CP  = 32,
  parameter int CE_LEN = 128,
  parameter int NDATA  = 3 * (512 + 32)
) (
  input  logic                 clk,
  input  logic                 sclr,
  input  logic                 start_transmit,
  input  logic signed [DW-1:0] din_i,
  input  logic signed [DW-1:0] din_q,
  input  logic                 din_valid,
  output logic signed [DW-1:0] dout_i,
  output logic signed [DW-1:0] dout_q,
  output logic                 vd_out
);
  localparam int HDR   = PRE_CP + 2 * HALF + CE_CP + CE_LEN;
  localparam int TOTAL = HDR + NDATA;
  localparam logic signed [DW-1:0] A = modem_pkg::QPSK_AMP;

  // n-th QPSK symbol of the header sequence: bits 2n and 2n+1 of the LFSR stream.
  function automatic logic [2*DW-1:0] seq_sym(input int n);
    logic [15:0] st;
    logic        b0, b1, fb;
    st = 16'hACE1;
    b0 = 1'b0; b1 = 1'b0;
    for (int j = 0; j <= 2 * n + 1; j++) begin
      fb = st[15] ^ st[13] ^ st[12] ^ st[10];
      if (j == 2 * n)     b0 = st[0];
      if (j == 2 * n + 1) b1 = st[0];
      st = {st[14:0], fb};
    end
    return {b0 ? -A : A, b1 ? -A : A};
  endfunction

  function automatic logic [2*DW-1:0] header_word(input int k);
    if (k < PRE_CP)                     return seq_sym((2 * HALF - PRE_CP + k) % HALF);
    if (k < PRE_CP + 2 * HALF)          return seq_sym((k - PRE_CP) % HALF);
    if (k < PRE_CP + 2 * HALF + CE_CP)  return seq_sym(HALF + CE_LEN - CE_CP + (k - PRE_CP - 2 * HALF));
    return seq_sym(HALF + (k - PRE_CP - 2 * HALF - CE_CP));
  endfunction

  logic [2*DW-1:0] hdr_tab [HDR];
  for (genvar k = 0; k < HDR; k++) begin : g_hdr
    localparam logic [2*DW-1:0] WORD = header_word(k);
    assign hdr_tab[k] = WORD;
  end

  logic [2*DW-1:0] delayed;
  logic [$clog2(TOTAL + 1)-1:0] cnt;
  logic active;

  shift_reg #(.W(2 * DW), .DEPTH(HDR)) u_delay (
    .clk, .sclr, .clr(1'b0), .en(1'b1),
    .din(din_valid ? {din_i, din_q} : '0), .dout(delayed));

  always_ff @(posedge clk) begin
    if (sclr) begin
      active <= 1'b0; cnt <= '0; vd_out <= 1'b0; dout_i <= '0; dout_q <= '0;
    end else begin
      vd_out <= active;
      if (start_transmit && !active) begin
        active <= 1'b1; cnt <= '0;
      end else if (active) begin
        cnt <= cnt + 1'b1;
        if (32'(cnt) < HDR) {dout_i, dout_q} <= hdr_tab[cnt[$clog2(HDR)-1:0]];
        else                {dout_i, dout_q} <= delayed;
        if (32'(cnt) == TOTAL - 1) active <= 1'b0;
      end
    end
  end
endmodule

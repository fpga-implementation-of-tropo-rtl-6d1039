// sc_cyclic_prefix: adds a cyclic prefix to each SC-FDMA symbol (the stage
// that replaces the IFFT of the OFDM transmitter). One register array of
// NFFT words is both filled and emptied:
//   S0 idle; on send_in -> S1 (temporary, take_out high one cycle) -> S2.
//   S2 (take/send): take_out is high for NFFT cycles in total per symbol and
//      each answered word (din_valid, one cycle after take_out) is stored at
//      the next position. On the first pass nothing is sent; on later passes
//      word k of the previous symbol is sent in the same cycle in which word
//      k of the next symbol is requested, so it is read before it is
//      overwritten.
//   S3 (send): sends words NFFT-CP .. NFFT-1, the cyclic prefix, then S2.
// After NSYM symbols it returns to S0. Output: a continuous stream of
// NSYM*(CP+NFFT) words with dout_valid; send_out pulses one cycle before the
// first word.
module sc_cyclic_prefix #(
  parameter int DW   = 16,
  parameter int NFFT = 512,
  parameter int CP   = 32,
  parameter int NSYM = 3
) (
  input  logic                 clk,
  input  logic                 sclr,
  input  logic                 send_in,
  output logic                 take_out,
  input  logic signed [DW-1:0] din_i,
  input  logic signed [DW-1:0] din_q,
  input  logic                 din_valid,
  output logic                 send_out,
  output logic signed [DW-1:0] dout_i,
  output logic signed [DW-1:0] dout_q,
  output logic                 dout_valid
);
  localparam int AW = $clog2(NFFT);
  typedef enum logic [1:0] {S0, S1, S2, S3} state_t;
  state_t state;

  logic [2*DW-1:0] buffer [NFFT];
  logic [AW-1:0]   wptr;
  logic [$clog2(NFFT + 1)-1:0] req, k;
  logic [$clog2(NSYM + 1)-1:0] taken, sent;
  logic first_pass, first_cp, sending, want;

  assign want     = (32'(taken) < NSYM) && (32'(req) < NFFT);
  assign take_out = (state == S1) || (state == S2 && want);
  assign sending  = (state == S3) || (state == S2 && !first_pass);
  assign send_out = (state == S3) && first_cp;

  always_ff @(posedge clk) begin
    if (din_valid) buffer[wptr] <= {din_i, din_q};
  end

  always_ff @(posedge clk) begin
    if (sclr) begin
      state <= S0; wptr <= '0; req <= '0; k <= '0; taken <= '0; sent <= '0;
      first_pass <= 1'b0; first_cp <= 1'b0;
      dout_valid <= 1'b0; dout_i <= '0; dout_q <= '0;
    end else begin
      if (din_valid) wptr <= (32'(wptr) == NFFT - 1) ? '0 : wptr + 1'b1;
      if (take_out && 32'(req) == NFFT - 1) taken <= taken + 1'b1;
      dout_valid <= sending;
      unique case (state)
        S0: if (send_in) begin
          state <= S1; wptr <= '0; taken <= '0; sent <= '0;
        end
        S1: begin
          state <= S2; req <= 1; k <= '0; first_pass <= 1'b1; first_cp <= 1'b1;
        end
        S2: begin
          if (want) req <= req + 1'b1;
          if (first_pass) begin
            if (din_valid && 32'(wptr) == NFFT - 1) begin
              state <= S3; k <= '0; req <= '0; first_pass <= 1'b0;
            end
          end else begin
            {dout_i, dout_q} <= buffer[k[AW-1:0]];
            k <= k + 1'b1;
            if (32'(k) == NFFT - 1) begin
              sent <= sent + 1'b1;
              k    <= '0;
              req  <= '0;
              state <= (32'(sent) == NSYM - 1) ? S0 : S3;
            end
          end
        end
        S3: begin
          first_cp <= 1'b0;
          {dout_i, dout_q} <= buffer[AW'(NFFT - CP) + k[AW-1:0]];
          k <= k + 1'b1;
          if (32'(k) == CP - 1) begin
            state <= S2; k <= '0;
          end
        end
        default: state <= S0;
      endcase
    end
  end
endmodule

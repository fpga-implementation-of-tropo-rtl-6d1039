// channel_est_fsm: interface in front of channel estimation.
// Input: the frequency-corrected frame as one continuous stream while
// channel_enable is high (the first symbol's cyclic prefix already removed:
// 512 + 8*544 samples). Output: NSYM bursts of NFFT samples with rdy high,
// each followed by GAP idle cycles, cyclic prefixes removed.
// Writing: a RAM pair (I and Q, 2^AW words, circular) takes every enabled
// sample, the write address restarting at 0 when channel_enable rises.
// Reading: START_WAIT cycles after that rise the FSM enters S0 (send NFFT
// words), then S1 (GAP idle cycles), after which the read address skips the CP
// words of the next symbol; this repeats NSYM times, and the last symbol is
// read out after channel_enable has already fallen. Outputs are registered
// (one cycle after the RAM read). 2^AW must be at least 576 (1024 default).
module channel_est_fsm #(
  parameter int DW         = 16,
  parameter int AW         = 10,
  parameter int NFFT       = 512,
  parameter int CP         = 32,
  parameter int GAP        = 64,
  parameter int START_WAIT = 64,
  parameter int NSYM       = 9
) (
  input  logic                 clk,
  input  logic                 sclr,
  input  logic signed [DW-1:0] data_out_freq_r,
  input  logic signed [DW-1:0] data_out_freq_i,
  input  logic                 channel_enable,
  output logic signed [DW-1:0] data_out_final_r,
  output logic signed [DW-1:0] data_out_final_i,
  output logic                 rdy
);
  typedef enum logic [1:0] {IDLE, WAIT, S0_SEND, S1_GAP} state_t;
  state_t state;

  logic          en_d, rising, rd_en;
  logic [AW-1:0] wa, wa_now, ra;
  logic [$clog2(NFFT + GAP + START_WAIT)-1:0] cnt;
  logic [$clog2(NSYM + 1)-1:0] sym;

  assign rising = channel_enable && !en_d;
  assign wa_now = rising ? '0 : wa;
  assign rd_en  = (state == S0_SEND);

  always_ff @(posedge clk) begin
    if (sclr) begin
      en_d <= 1'b0; wa <= '0;
    end else begin
      en_d <= channel_enable;
      if (channel_enable) wa <= wa_now + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (sclr) begin
      state <= IDLE; cnt <= '0; sym <= '0; ra <= '0; rdy <= 1'b0;
    end else begin
      rdy <= rd_en;
      unique case (state)
        IDLE: if (rising) begin
          state <= WAIT; cnt <= 1;
        end
        WAIT: begin
          cnt <= cnt + 1'b1;
          if (32'(cnt) == START_WAIT - 1) begin
            state <= S0_SEND; cnt <= '0; ra <= '0; sym <= '0;
          end
        end
        S0_SEND: begin
          cnt <= cnt + 1'b1;
          ra  <= ra + 1'b1;
          if (32'(cnt) == NFFT - 1) begin
            cnt <= '0;
            ra  <= ra + 1'b1 + AW'(CP);
            sym <= sym + 1'b1;
            state <= (32'(sym) == NSYM - 1) ? IDLE : S1_GAP;
          end
        end
        S1_GAP: begin
          cnt <= cnt + 1'b1;
          if (32'(cnt) == GAP - 1) begin
            state <= S0_SEND; cnt <= '0;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  sdp_ram #(.W(DW), .AW(AW)) u_mem_re (
    .clk, .we(channel_enable), .waddr(wa_now), .wdata(data_out_freq_r),
    .re(rd_en), .raddr(ra), .rdata(data_out_final_r));
  sdp_ram #(.W(DW), .AW(AW)) u_mem_im (
    .clk, .we(channel_enable), .waddr(wa_now), .wdata(data_out_freq_i),
    .re(rd_en), .raddr(ra), .rdata(data_out_final_i));
endmodule

// scfdma_rx_memstore: input buffer of the SC-FDMA receiver. Every received
// sample is written into a circular RAM (2^AW words of I and Q) whose write
// address advances every cycle from reset, so address = sample time modulo
// 2^AW. The frame is then released in two parts:
//   1. enable (one cycle, from the top FSM once the preamble is found) with
//      location = first address after the preamble: the 32-sample prefix of
//      the channel-estimation block is skipped and its CEM (128) samples are
//      sent on cem_* with cem_valid.
//   2. fft_start (one cycle, from the top FSM): for each of the NSYM data
//      symbols, its cyclic prefix is skipped and its NFFT samples are sent to
//      an external FFT on fft_in_* (fft_in_first marks the first of them).
//      The FFT answers with fft_ready for one cycle followed by NFFT results,
//      which are passed on, registered, on out_* with out_valid; then the next
//      symbol is sent. done pulses after the last result of the last symbol.
// Four states, as in the original: ST_INIT (wait for enable), ST_SEND_CEM,
// ST_SEND_FFT (one symbol into the FFT) and ST_SEND (its results out).
// Reads have one cycle of latency, so cem_valid and fft_in_valid follow the
// read by one cycle. The buffer counts the samples written since location
// and never reads one that has not arrived: pilots are read as they come in,
// and a symbol goes to the FFT only once all of its NFFT samples are stored,
// so that its burst has no gaps. enable must come within 2^AW cycles of the
// preamble, and the frame must be read before it is overwritten: 2^AW must
// exceed the frame after the preamble, 32 + 128 + NSYM * (32 + 512) = 1792
// samples for 3 symbols. The buffer size and the handshake details are this
// design's own; the FFT is a vendor core and stays outside.
module scfdma_rx_memstore #(
  parameter int DW   = 16,
  parameter int AW   = 11,
  parameter int CP   = 32,
  parameter int CEM  = 128,
  parameter int NFFT = 512,
  parameter int NSYM = 3
) (
  input  logic                 clk,
  input  logic                 sclr,
  input  logic signed [DW-1:0] din_r,
  input  logic signed [DW-1:0] din_i,
  input  logic                 enable,
  input  logic        [AW-1:0] location,
  input  logic                 fft_start,
  // channel-estimation pilots
  output logic signed [DW-1:0] cem_r,
  output logic signed [DW-1:0] cem_i,
  output logic                 cem_valid,
  // to the external FFT
  output logic signed [DW-1:0] fft_in_r,
  output logic signed [DW-1:0] fft_in_i,
  output logic                 fft_in_valid,
  output logic                 fft_in_first,
  // from the external FFT
  input  logic                 fft_ready,
  input  logic signed [DW-1:0] fft_out_r,
  input  logic signed [DW-1:0] fft_out_i,
  // transformed data symbols
  output logic signed [DW-1:0] out_r,
  output logic signed [DW-1:0] out_i,
  output logic                 out_valid,
  output logic                 done
);
  typedef enum logic [1:0] {ST_INIT, ST_SEND_CEM, ST_SEND_FFT, ST_SEND} state_t;
  localparam int CW = $clog2(NFFT + 1);
  localparam int SW = $clog2(NSYM + 1);
  localparam int FW = $clog2(CP + CEM + NSYM * (CP + NFFT) + NFFT + 1) + 1;

  state_t        state;
  logic [AW-1:0] wr_addr, rd_addr, loc;
  logic [FW-1:0] wcnt, rcnt;      // samples written / read position, from location
  logic [CW-1:0] cnt;
  logic [SW-1:0] sym;
  logic          fwd, re, rd_cem, rd_fft, rd_first;
  logic signed [DW-1:0] rd_r, rd_i;

  always_ff @(posedge clk) begin
    if (sclr) wr_addr <= '0;
    else      wr_addr <= wr_addr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (sclr)                            wcnt <= '0;
    else if (state == ST_INIT && enable) wcnt <= FW'(wr_addr - location) + 1'b1;
    else if (!(&wcnt))                   wcnt <= wcnt + 1'b1;
  end

  assign rd_addr = loc + AW'(rcnt);
  assign rd_cem = (state == ST_SEND_CEM) && (32'(cnt) < CEM) && (wcnt > rcnt);
  assign rd_fft = (state == ST_SEND_FFT) && (cnt != '0 || wcnt >= rcnt + FW'(NFFT));
  assign re     = rd_cem || rd_fft;

  always_ff @(posedge clk) begin
    if (sclr) begin
      state <= ST_INIT; loc <= '0; rcnt <= '0; cnt <= '0; sym <= '0; fwd <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (re) rcnt <= rcnt + 1'b1;
      case (state)
        ST_INIT: if (enable) begin
          loc     <= location;
          rcnt    <= FW'(CP);
          cnt     <= '0;
          state   <= ST_SEND_CEM;
        end
        ST_SEND_CEM: begin
          if (rd_cem) cnt <= cnt + 1'b1;
          else if (fft_start) begin
            // rcnt now points at the first symbol's cyclic prefix
            rcnt    <= rcnt + FW'(CP);
            cnt     <= '0;
            sym     <= '0;
            state   <= ST_SEND_FFT;
          end
        end
        ST_SEND_FFT: begin
          if (rd_fft) cnt <= cnt + 1'b1;
          if (rd_fft && 32'(cnt) == NFFT - 1) begin
            cnt   <= '0;
            state <= ST_SEND;
          end
        end
        ST_SEND: begin
          if (!fwd) begin
            if (fft_ready) begin fwd <= 1'b1; cnt <= '0; end
          end else begin
            cnt <= cnt + 1'b1;
            if (32'(cnt) == NFFT - 1) begin
              fwd <= 1'b0;
              cnt <= '0;
              if (32'(sym) == NSYM - 1) begin
                done  <= 1'b1;
                state <= ST_INIT;
              end else begin
                sym     <= sym + 1'b1;
                rcnt    <= rcnt + FW'(CP);
                state   <= ST_SEND_FFT;
              end
            end
          end
        end
        default: state <= ST_INIT;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (sclr) begin
      cem_valid <= 1'b0; fft_in_valid <= 1'b0; fft_in_first <= 1'b0;
      out_valid <= 1'b0; out_r <= '0; out_i <= '0;
    end else begin
      cem_valid    <= rd_cem;
      fft_in_valid <= rd_fft;
      fft_in_first <= rd_first;
      out_valid    <= fwd;
      if (fwd) begin out_r <= fft_out_r; out_i <= fft_out_i; end
    end
  end
  assign rd_first = rd_fft && (cnt == '0);

  assign cem_r    = rd_r;
  assign cem_i    = rd_i;
  assign fft_in_r = rd_r;
  assign fft_in_i = rd_i;

  sdp_ram #(.W(DW), .AW(AW)) u_ram_r (
    .clk, .we(1'b1), .waddr(wr_addr), .wdata(din_r),
    .re, .raddr(rd_addr), .rdata(rd_r));
  sdp_ram #(.W(DW), .AW(AW)) u_ram_i (
    .clk, .we(1'b1), .waddr(wr_addr), .wdata(din_i),
    .re, .raddr(rd_addr), .rdata(rd_i));
endmodule

// sc_pilot: SC-FDMA pilot insertion. Receives the 1440 data symbols of a frame
// and sends NSYM = 3 symbols of NFFT = 512 words, each with NPILOT = 32 pilot
// words at fixed positions and 480 data words in order between them.
// Input FSM: S0 idle; on send_in, S1 raises take_out for one cycle; S2
// stores words while din_valid is high and returns to S0 when it falls.
// send_out is raised from S2 until the next stage starts taking.
// Output FSM: S0 idle; on take_in with send_out it moves to S1; one word is
// sent for every cycle take_in is high (dout_valid one cycle later). A
// position counter runs 0..NFFT-1 three times; at a pilot position the pilot
// value is sent, otherwise the next stored data word. Pilots sit at every
// (NFFT/NPILOT)-th position starting at 0, with value (PILOT_I, PILOT_Q);
// positions and value are this design's choices.
module sc_pilot #(
  parameter int DW     = 16,
  parameter int NSYM   = 3,
  parameter int NFFT   = 512,
  parameter int NPILOT = 32,
  parameter logic signed [DW-1:0] PILOT_I = modem_pkg::QPSK_AMP,
  parameter logic signed [DW-1:0] PILOT_Q = -modem_pkg::QPSK_AMP
) (
  input  logic                 clk,
  input  logic                 sclr,
  input  logic                 send_in,
  output logic                 take_out,
  input  logic signed [DW-1:0] din_i,
  input  logic signed [DW-1:0] din_q,
  input  logic                 din_valid,
  output logic                 send_out,
  input  logic                 take_in,
  output logic signed [DW-1:0] dout_i,
  output logic signed [DW-1:0] dout_q,
  output logic                 dout_valid
);
  localparam int NDATA   = NSYM * (NFFT - NPILOT);   // 1440
  localparam int SPACING = NFFT / NPILOT;            // 16

  typedef enum logic [1:0] {PS0, PS1, PS2} in_state_t;
  typedef enum logic {QS0, QS1} out_state_t;
  in_state_t  ist;
  out_state_t ost;

  logic [2*DW-1:0] mem [NDATA];
  logic [$clog2(NDATA + 1)-1:0] wcnt, rcnt;
  logic [$clog2(NFFT)-1:0]      pos;
  logic [$clog2(NSYM + 1)-1:0]  sym;
  logic seen, ready, emit, is_pilot;

  assign take_out = (ist == PS1);
  assign send_out = ready;
  assign emit     = take_in && ((ost == QS1) || ready);
  assign is_pilot = (32'(pos) % SPACING) == 0;

  always_ff @(posedge clk) begin
    if (din_valid && ist == PS2) mem[wcnt[$clog2(NDATA)-1:0]] <= {din_i, din_q};
  end

  always_ff @(posedge clk) begin
    if (sclr) begin
      ist <= PS0; wcnt <= '0; seen <= 1'b0; ready <= 1'b0;
    end else begin
      unique case (ist)
        PS0: if (send_in) begin
          ist <= PS1; wcnt <= '0; seen <= 1'b0;
        end
        PS1: begin
          ist <= PS2; ready <= 1'b1;
        end
        PS2: begin
          if (din_valid) begin
            wcnt <= wcnt + 1'b1; seen <= 1'b1;
          end else if (seen) begin
            ist <= PS0;
          end
        end
        default: ist <= PS0;
      endcase
      if (ost == QS0 && emit) ready <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (sclr) begin
      ost <= QS0; rcnt <= '0; pos <= '0; sym <= '0;
      dout_valid <= 1'b0; dout_i <= '0; dout_q <= '0;
    end else begin
      dout_valid <= emit;
      if (ost == QS0 && emit) begin
        ost <= QS1;
      end
      if (emit) begin
        if (is_pilot) begin
          {dout_i, dout_q} <= {PILOT_I, PILOT_Q};
        end else begin
          {dout_i, dout_q} <= mem[rcnt[$clog2(NDATA)-1:0]];
          rcnt <= rcnt + 1'b1;
        end
        pos <= pos + 1'b1;
        if (32'(pos) == NFFT - 1) begin
          pos <= '0;
          sym <= sym + 1'b1;
          if (32'(sym) == NSYM - 1) begin
            ost <= QS0; sym <= '0; rcnt <= '0;
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (sclr)
    (emit && !is_pilot) |-> (rcnt < wcnt || ist != PS2));
endmodule

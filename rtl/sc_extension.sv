// sc_extension: SC-FDMA transmitter stage that turns the N_IN = 1152 QPSK
// symbols of one encoder burst into the N_OUT = 1440 data symbols of a frame
// by appending a constant QPSK symbol.
// Handshake on both sides (send/take): the previous stage raises send_in when
// it has data; this stage answers with take_out and then receives N_IN words
// on consecutive cycles with din_valid. One cycle after the first word is
// stored, send_out tells the next stage data is ready; when it answers with
// take_in the stage sends N_OUT words on consecutive cycles (dout_valid),
// stored words first, then the pad symbol.
// Two FSMs: input (S0 idle, S1 taking with take_out high, S2 holding until
// the output FSM reports "stop") and output (S0 idle, S1 sending).
// Storage is a register array of N_IN words.
module sc_extension #(
  parameter int DW    = 16,
  parameter int N_IN  = 1152,
  parameter int N_OUT = 1440,
  parameter logic signed [DW-1:0] PAD_I = modem_pkg::QPSK_AMP,
  parameter logic signed [DW-1:0] PAD_Q = modem_pkg::QPSK_AMP
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
  typedef enum logic [1:0] {IS0, IS1, IS2} in_state_t;
  typedef enum logic {OS0, OS1} out_state_t;
  in_state_t  ist;
  out_state_t ost;

  logic [2*DW-1:0] mem [N_IN];
  logic [$clog2(N_IN + 1)-1:0]  wcnt;
  logic [$clog2(N_OUT + 1)-1:0] rcnt;
  logic stop, have_data;

  assign take_out = (ist == IS1);
  assign send_out = have_data && (ost == OS0);

  always_ff @(posedge clk) begin
    if (din_valid && ist == IS1) mem[wcnt] <= {din_i, din_q};
  end

  // input FSM
  always_ff @(posedge clk) begin
    if (sclr) begin
      ist <= IS0; wcnt <= '0; have_data <= 1'b0;
    end else begin
      unique case (ist)
        IS0: if (send_in) begin
          ist <= IS1; wcnt <= '0;
        end
        IS1: if (din_valid) begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == '0) have_data <= 1'b1;
          if (32'(wcnt) == N_IN - 1) ist <= IS2;
        end
        IS2: ;
        default: ist <= IS0;
      endcase
      if (ost == OS0 && take_in && have_data) have_data <= 1'b0;
      if (stop) ist <= IS0;
    end
  end

  // output FSM
  always_ff @(posedge clk) begin
    if (sclr) begin
      ost <= OS0; rcnt <= '0; stop <= 1'b0; dout_valid <= 1'b0; dout_i <= '0; dout_q <= '0;
    end else begin
      stop       <= 1'b0;
      dout_valid <= 1'b0;
      unique case (ost)
        OS0: if (take_in && have_data) begin
          ost <= OS1; rcnt <= '0;
        end
        OS1: begin
          dout_valid <= 1'b1;
          if (32'(rcnt) < N_IN) {dout_i, dout_q} <= mem[rcnt[$clog2(N_IN)-1:0]];
          else                  {dout_i, dout_q} <= {PAD_I, PAD_Q};
          rcnt <= rcnt + 1'b1;
          if (32'(rcnt) == N_OUT - 1) begin
            ost <= OS0; stop <= 1'b1;
          end
        end
        default: ost <= OS0;
      endcase
    end
  end

  // A stored word is never read before it has been written.
  assert property (@(posedge clk) disable iff (sclr)
    (ost == OS1 && 32'(rcnt) < N_IN) |-> (ist == IS2 || rcnt < wcnt));
endmodule

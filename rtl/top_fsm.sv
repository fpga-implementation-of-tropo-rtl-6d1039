// top_fsm: first part of the OFDM receiver. The received samples go both into
// memstore (buffering) and into topmsandc (Schmidl-Cox detection); the control
// block sequences them. Outputs: the frame samples from the first data sample
// on (first cyclic prefix removed) with data_valid, the phase estimate, and
// freq_enable for freq_correct, aligned so that sine/cosine and data meet.
module top_fsm #(
  parameter int DW     = 16,
  parameter int AW     = 8,
  parameter int PW     = 32,
  parameter int ITER   = 20,
  parameter int SAFETY = 4,
  parameter int FRAME  = modem_pkg::FRAME_LEN,
  parameter int CP     = modem_pkg::CP_LEN
) (
  input  logic                 clk,
  input  logic                 sclr,
  input  logic signed [DW-1:0] rx_r,
  input  logic signed [DW-1:0] rx_i,
  input  logic        [15:0]   threshold,
  output logic signed [DW-1:0] data_r,
  output logic signed [DW-1:0] data_i,
  output logic                 data_valid,
  output logic signed [PW-1:0] phase,
  output logic                 freq_enable,
  output logic                 packet,
  output logic        [AW-1:0] location,
  output logic                 frame_done
);
  logic clr, rd_en, phase_valid;

  memstore #(.DW(DW), .AW(AW), .CP(CP)) u_memstore (
    .clk, .sclr, .din_r(rx_r), .din_i(rx_i), .rd_en, .location,
    .dout_r(data_r), .dout_i(data_i), .dout_valid(data_valid));

  topmsandc #(.DW(DW), .AW(AW), .PW(PW), .ITER(ITER), .SAFETY(SAFETY)) u_sc (
    .clk, .sclr, .clr, .din_r(rx_r), .din_i(rx_i), .threshold,
    .packet, .location, .phase, .phase_valid);

  topfsm_ctrl #(.VLAT(ITER + 1), .FC_LAT(ITER + 2), .FRAME(FRAME)) u_ctrl (
    .clk, .sclr, .packet, .clr, .freq_enable, .mem_rd_en(rd_en), .frame_done);

  // The phase register is loaded exactly when freq_correct starts.
  assert property (@(posedge clk) disable iff (sclr) phase_valid |-> $rose(freq_enable));
endmodule

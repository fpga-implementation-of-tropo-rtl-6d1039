// top_connect: the OFDM receiver front end, from received samples to the
// input of channel estimation:
//   top_fsm (buffer, Schmidl-Cox detection, phase, control)
//   -> freq_correct (per-sample sine/cosine) -> freq_correct_mult
//   -> channel_est_fsm (bursts of 512 with 64-cycle gaps, CPs removed).
// One sample per clock in; the threshold can be changed at run time.
module top_connect #(
  parameter int DW     = 16,
  parameter int AW     = 8,
  parameter int ITER   = 20,
  parameter int SAFETY = 4,
  parameter int NFFT   = modem_pkg::NFFT,
  parameter int CP     = modem_pkg::CP_LEN,
  parameter int NSYM   = modem_pkg::NSYM
) (
  input  logic                 clk,
  input  logic                 sclr,
  input  logic signed [DW-1:0] rx_r,
  input  logic signed [DW-1:0] rx_i,
  input  logic        [15:0]   threshold,
  output logic signed [DW-1:0] data_out_final_r,
  output logic signed [DW-1:0] data_out_final_i,
  output logic                 rdy,
  output logic                 packet,
  output logic                 frame_done
);
  localparam int PW    = 32;
  localparam int FRAME = NFFT + (NFFT + CP) * (NSYM - 1);

  logic signed [DW-1:0] data_r, data_i, sine, cosine, fr, fi;
  logic signed [PW-1:0] phase;
  logic data_valid, freq_enable, corr_enable, channel_enable;

  top_fsm #(.DW(DW), .AW(AW), .PW(PW), .ITER(ITER), .SAFETY(SAFETY), .FRAME(FRAME), .CP(CP)) u_top_fsm (
    .clk, .sclr, .rx_r, .rx_i, .threshold,
    .data_r, .data_i, .data_valid, .phase, .freq_enable, .packet, .location(), .frame_done);

  freq_correct #(.W(PW), .ITER(ITER), .SHIFT($clog2(modem_pkg::CORR_DEPTH))) u_freq_correct (
    .clk, .sclr, .phase, .freq_enable, .sine, .cosine, .corr_enable);

  freq_correct_mult #(.DW(DW)) u_freq_mult (
    .data_r, .data_i, .sine, .cosine, .corr_enable,
    .data_out_freq_r(fr), .data_out_freq_i(fi), .channel_enable);

  channel_est_fsm #(.DW(DW), .NFFT(NFFT), .CP(CP), .NSYM(NSYM)) u_ce_if (
    .clk, .sclr, .data_out_freq_r(fr), .data_out_freq_i(fi), .channel_enable,
    .data_out_final_r, .data_out_final_i, .rdy);

  // Data from memstore and sine/cosine from freq_correct must coincide.
  assert property (@(posedge clk) disable iff (sclr) corr_enable == data_valid);
endmodule

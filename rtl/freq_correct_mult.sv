// freq_correct_mult: removes the frequency offset from each sample by a
// complex multiplication with (cosine + j*sine), both 2.14:
//   data_out_freq_r = (data_r*cosine - data_i*sine) >>> 14
//   data_out_freq_i = (data_i*cosine + data_r*sine) >>> 14
// Combinational (multiplier latency 0), so channel_enable equals corr_enable.
// Results outside 16 bits saturate (this design's choice).
module freq_correct_mult #(
  parameter int DW   = 16,
  parameter int FRAC = 14
) (
  input  logic signed [DW-1:0] data_r,
  input  logic signed [DW-1:0] data_i,
  input  logic signed [DW-1:0] sine,
  input  logic signed [DW-1:0] cosine,
  input  logic                 corr_enable,
  output logic signed [DW-1:0] data_out_freq_r,
  output logic signed [DW-1:0] data_out_freq_i,
  output logic                 channel_enable
);
  localparam int PW = 2 * DW + 1;
  localparam logic signed [PW-1:0] MAXV = PW'((2 ** (DW - 1)) - 1);
  localparam logic signed [PW-1:0] MINV = -PW'(2 ** (DW - 1));

  logic signed [PW-1:0] pr, pi_, sr, si;

  function automatic logic signed [DW-1:0] sat(input logic signed [PW-1:0] v);
    if (v > MAXV)      return DW'(MAXV);
    else if (v < MINV) return DW'(MINV);
    else               return DW'(v);
  endfunction

  always_comb begin
    pr  = PW'(data_r) * PW'(cosine) - PW'(data_i) * PW'(sine);
    pi_ = PW'(data_i) * PW'(cosine) + PW'(data_r) * PW'(sine);
    sr  = pr  >>> FRAC;
    si  = pi_ >>> FRAC;
  end

  assign data_out_freq_r = sat(sr);
  assign data_out_freq_i = sat(si);
  assign channel_enable  = corr_enable;
endmodule

// topmsandc: Schmidl-Cox timing and frequency estimation.
// Data path (one sample per cycle, no stall):
//   register banks -> correlator (5 products) -> adder_subtractor ->
//   4 accumulators (sliding sums over DEPTH=32 samples) -> comp -> CORDIC.
// Each accumulator adds the value entering the window and subtracts the one
// leaving it, so ac1/ac2 are the energies of the two preamble halves and
// cc the cross-correlation between them. comp raises packet and gives the
// location (first address after the preamble, counted by tcount in step with
// the memstore write address) and the cross-correlation at the peak; a
// vectoring CORDIC turns that into the phase (3.(PW-3) radians), available
// ITER+1 cycles after packet and held in a register (phase_valid pulses).
// clr, from the control block, empties the registers and accumulators so the
// next frame starts clean; tcount and the held results are not cleared.
module topmsandc #(
  parameter int DW     = 16,
  parameter int DEPTH  = 32,
  parameter int AW     = 8,
  parameter int PW     = 32,
  parameter int ITER   = 20,
  parameter int SAFETY = 4
) (
  input  logic                 clk,
  input  logic                 sclr,
  input  logic                 clr,
  input  logic signed [DW-1:0] din_r,
  input  logic signed [DW-1:0] din_i,
  input  logic        [15:0]   threshold,
  output logic                 packet,
  output logic        [AW-1:0] location,
  output logic signed [PW-1:0] phase,
  output logic                 phase_valid
);
  localparam int CW    = 2 * DW + 1;                    // product width
  localparam int ACC_W = CW + 1 + $clog2(DEPTH) + 1;    // window-sum width

  logic signed [DW-1:0] w0r, w32r, w64r, w0i, w32i, w64i;
  logic signed [CW-1:0] ac0, ac32, ac64, cc320r, cc320i, cc6432r, cc6432i;
  logic signed [CW:0]   acs1, acs2, ccsr, ccsi;
  logic signed [ACC_W-1:0] ac1, ac2, ccr, cci, pk_r, pk_i;
  logic [AW-1:0] tcount;
  logic signed [PW-1:0] angle;
  logic                 angle_valid;

  always_ff @(posedge clk) begin
    if (sclr) tcount <= '0;
    else      tcount <= tcount + 1'b1;
  end

  register_bank #(.W(DW), .DEPTH(DEPTH)) u_bank_r (
    .clk, .sclr, .clr, .din(din_r), .w0(w0r), .w32(w32r), .w64(w64r));
  register_bank #(.W(DW), .DEPTH(DEPTH)) u_bank_i (
    .clk, .sclr, .clr, .din(din_i), .w0(w0i), .w32(w32i), .w64(w64i));

  correlator #(.W(DW)) u_corr (
    .w0r, .w0i, .w32r, .w32i, .w64r, .w64i,
    .ac0, .ac32, .ac64, .cc320r, .cc320i, .cc6432r, .cc6432i);

  adder_subtractor #(.W(CW)) u_addsub (
    .ac0, .ac32, .ac64, .cc320r, .cc320i, .cc6432r, .cc6432i,
    .acs1, .acs2, .ccsr, .ccsi);

  accumulator #(.W(ACC_W)) u_acc1 (.clk, .sclr, .clr, .en(1'b1), .din(ACC_W'(acs1)), .acc(ac1));
  accumulator #(.W(ACC_W)) u_acc2 (.clk, .sclr, .clr, .en(1'b1), .din(ACC_W'(acs2)), .acc(ac2));
  accumulator #(.W(ACC_W)) u_accr (.clk, .sclr, .clr, .en(1'b1), .din(ACC_W'(ccsr)), .acc(ccr));
  accumulator #(.W(ACC_W)) u_acci (.clk, .sclr, .clr, .en(1'b1), .din(ACC_W'(ccsi)), .acc(cci));

  comp #(.ACC_W(ACC_W), .AW(AW), .SAFETY(SAFETY)) u_comp (
    .clk, .sclr, .clr, .ac1, .ac2, .ccr, .cci, .threshold, .tcount,
    .packet, .cc_r(pk_r), .cc_i(pk_i), .location);

  cordic_vector #(.W(PW), .ITER(ITER)) u_cordic (
    .clk, .sclr, .in_valid(packet),
    .x(PW'(pk_r >>> (ACC_W - PW))), .y(PW'(pk_i >>> (ACC_W - PW))),
    .out_valid(angle_valid), .angle(angle));

  always_ff @(posedge clk) begin
    if (sclr) begin
      phase <= '0; phase_valid <= 1'b0;
    end else begin
      phase_valid <= angle_valid;
      if (angle_valid) phase <= angle;
    end
  end
endmodule

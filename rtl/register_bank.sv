// register_bank: two DEPTH-deep shift registers in series. For one component
// (real or imaginary) of the received stream it gives the present sample w0
// and the samples DEPTH and 2*DEPTH cycles earlier (w32 and w64 for the
// Schmidl-Cox correlation depth of 32). The taps are valid one cycle after
// each input; w0 is the input itself. clr empties both registers.
module register_bank #(
  parameter int W     = 16,
  parameter int DEPTH = 32
) (
  input  logic                clk,
  input  logic                sclr,
  input  logic                clr,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] w0,
  output logic signed [W-1:0] w32,
  output logic signed [W-1:0] w64
);
  shift_reg #(.W(W), .DEPTH(DEPTH)) u_sr1 (
    .clk, .sclr, .clr, .en(1'b1), .din(din), .dout(w32));
  shift_reg #(.W(W), .DEPTH(DEPTH)) u_sr2 (
    .clk, .sclr, .clr, .en(1'b1), .din(w32), .dout(w64));
  assign w0 = din;
endmodule

// accumulator: an adder and a register in a loop; on every enabled clock edge
// acc <= acc + din. sclr and clr clear it to zero. Output is the register
// (one cycle latency), as in the modem's parameterized accumulator.
module accumulator #(
  parameter int W = 39
) (
  input  logic                clk,
  input  logic                sclr,
  input  logic                clr,
  input  logic                en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] acc
);
  always_ff @(posedge clk) begin
    if (sclr || clr) acc <= '0;
    else if (en)     acc <= acc + din;
  end
endmodule

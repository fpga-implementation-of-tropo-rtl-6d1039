// sdp_ram: simple dual-port RAM of 2^AW words of W bits, the modem's
// parameterized replacement for the RAM core. A word is written on the clock
// edge when we is high; rdata is registered and loads mem[raddr] on the clock
// edge when re is high (one cycle read latency). Reading and writing the same
// address in one cycle returns the old word.
module sdp_ram #(
  parameter int W  = 16,
  parameter int AW = 8
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end
endmodule

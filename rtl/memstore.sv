// memstore: first stage of the OFDM receiver. Every received sample is written
// into a circular RAM (2^AW words of I and Q) whose write address advances
// every cycle from reset, so that address = sample time modulo 2^AW. The
// preamble detector runs a time counter in step with this address and reports
// the preamble location (the first address after the preamble). When rd_en
// rises, reading starts at location + CP, skipping the first cyclic prefix,
// and advances one address per cycle while rd_en stays high. dout_* is
// registered: dout_valid is rd_en delayed by one cycle.
// The RAM only has to cover the detection and CORDIC latency (about 50
// cycles); its size is not specified and 256 words are used by default.
module memstore #(
  parameter int DW = 16,
  parameter int AW = 8,
  parameter int CP = 32
) (
  input  logic                 clk,
  input  logic                 sclr,
  input  logic signed [DW-1:0] din_r,
  input  logic signed [DW-1:0] din_i,
  input  logic                 rd_en,
  input  logic        [AW-1:0] location,
  output logic signed [DW-1:0] dout_r,
  output logic signed [DW-1:0] dout_i,
  output logic                 dout_valid
);
  logic [AW-1:0] wr_addr, rd_addr, addr_now;
  logic          rd_active;

  always_ff @(posedge clk) begin
    if (sclr) wr_addr <= '0;
    else      wr_addr <= wr_addr + 1'b1;
  end

  assign addr_now = rd_active ? rd_addr : location + AW'(CP);

  always_ff @(posedge clk) begin
    if (sclr) begin
      rd_active <= 1'b0; rd_addr <= '0; dout_valid <= 1'b0;
    end else begin
      rd_active  <= rd_en;
      dout_valid <= rd_en;
      if (rd_en) rd_addr <= addr_now + 1'b1;
    end
  end

  sdp_ram #(.W(DW), .AW(AW)) u_ram_r (
    .clk, .we(1'b1), .waddr(wr_addr), .wdata(din_r),
    .re(rd_en), .raddr(addr_now), .rdata(dout_r));
  sdp_ram #(.W(DW), .AW(AW)) u_ram_i (
    .clk, .we(1'b1), .waddr(wr_addr), .wdata(din_i),
    .re(rd_en), .raddr(addr_now), .rdata(dout_i));
endmodule

// sync_fifo: single-clock FIFO of 2^AW words. A word enters on a clock edge
// with wr_en (ignored when the FIFO holds 2^AW words); with rd_en and not
// empty the oldest word is loaded into the registered dout and dout_valid
// pulses the next cycle. empty is count == 0; full is the threshold flag:
// count >= THRESH ("enough data to read").
module sync_fifo #(
  parameter int W      = 8,
  parameter int AW     = 10,
  parameter int THRESH = 32
) (
  input  logic         clk,
  input  logic         sclr,
  input  logic         wr_en,
  input  logic [W-1:0] din,
  input  logic         rd_en,
  output logic [W-1:0] dout,
  output logic         dout_valid,
  output logic         empty,
  output logic         full,
  output logic [AW:0]  count
);
  logic [W-1:0]  mem [2**AW];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign do_wr = wr_en && (count != (AW+1)'(2**AW));
  assign do_rd = rd_en && (count != '0);
  assign empty = (count == '0);
  assign full  = (32'(count) >= THRESH);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (sclr) begin
      wp <= '0; rp <= '0; count <= '0; dout <= '0; dout_valid <= 1'b0;
    end else begin
      dout_valid <= do_rd;
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) begin
        dout <= mem[rp];
        rp   <= rp + 1'b1;
      end
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
endmodule

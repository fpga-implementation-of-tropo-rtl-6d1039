// final_fifo: turns the LDPC decoder output into message bytes.
// Each valid 21-bit word holds three 7-bit LLRs; bits 21, 14 and 7 (indices
// 20, 13, 6) are the three message bits, taken in that order. They are
// shifted into a 24-bit register; after 8 words it is full ("pack"), is
// copied to a holding register and sent in the next three cycles as three
// bytes, most significant first. Each byte is XORed with the receiver's
// bit-reversed LFSR byte (the LFSR steps once per byte) and written into a
// FIFO. full rises when the FIFO holds THRESH bytes; an external rd_en reads
// it (dout valid one cycle later with output_valid).
// Packing order of the three bits is this design's choice. Only the sign
// bit of each LLR is used (hard decision), so the other 18 input bits are
// intentionally unread.
module final_fifo #(
  parameter int FIFO_AW = 10,
  parameter int THRESH  = 32,
  parameter logic [63:0] SEED = 64'hACE1_2468_1357_9BDF
) (
  input  logic        clk,
  input  logic        sclr,
  input  logic [20:0] dout_ldpc,
  input  logic        input_valid,
  input  logic        rd_en,
  output logic [7:0]  dout,
  output logic        output_valid,
  output logic        full,
  output logic        empty
);
  logic [20:0] sr;
  logic [23:0] hold;
  logic [2:0]  cnt;
  logic [1:0]  unpack;        // bytes still to send
  logic        pack;
  logic [7:0]  byte_raw, lfsr_byte;
  logic        byte_we;

  assign pack = input_valid && (cnt == 3'd7);

  always_ff @(posedge clk) begin
    if (sclr) begin
      sr <= '0; cnt <= '0; hold <= '0; unpack <= '0;
    end else begin
      if (input_valid) begin
        sr  <= {sr[17:0], dout_ldpc[20], dout_ldpc[13], dout_ldpc[6]};
        cnt <= cnt + 1'b1;
      end
      if (pack) begin
        hold   <= {sr, dout_ldpc[20], dout_ldpc[13], dout_ldpc[6]};
        unpack <= 2'd3;
      end else if (unpack != 0) begin
        hold   <= {hold[15:0], 8'h00};
        unpack <= unpack - 1'b1;
      end
    end
  end

  assign byte_we  = (unpack != 0);
  assign byte_raw = hold[23:16];

  lfsr64 #(.SEED(SEED), .REVERSE(1'b1)) u_lfsr (
    .clk, .sclr, .en(byte_we), .out(lfsr_byte));

  sync_fifo #(.W(8), .AW(FIFO_AW), .THRESH(THRESH)) u_fifo (
    .clk, .sclr, .wr_en(byte_we), .din(byte_raw ^ lfsr_byte),
    .rd_en, .dout, .dout_valid(output_valid), .empty, .full, .count());
endmodule

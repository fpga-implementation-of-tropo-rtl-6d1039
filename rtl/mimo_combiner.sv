// mimo_combiner: joins the channel-corrected outputs of four receive chains
// into one stream for the LDPC decoder.
// Each chain writes its symbols (bursts of NMSG=384 with GAP=192 idle cycles)
// into its own RAM pair on its valid; the write address returns to 0 after
// FRAME_WR = 384*9 words, so that a chain that missed a frame is realigned.
// FSM: S0 waits for any valid of a chain selected by rx_valid; S1 waits WAIT
// cycles so that later chains catch up; at the end of S1 the chains whose
// valid is high are latched as active. S2 reads NMSG words from all RAMs at
// one common address, S3 idles GAP cycles; S2/S3 repeat NSYM times, then S0.
// Each RAM output is ANDed with its active flag and the four are summed by the
// saturating clip tree, so the level stays usable with 1 to 4 chains.
// Outputs: out_r/out_i with out_valid, one cycle after the RAM read.
module mimo_combiner #(
  parameter int DW       = 16,
  parameter int AW       = 12,
  parameter int WAIT     = 10,
  parameter int NMSG     = 384,
  parameter int GAP      = 192,
  parameter int NSYM     = 9,
  parameter int FRAME_WR = 3456
) (
  input  logic                 clk,
  input  logic                 sclr,
  input  logic [3:0]           in_valid,
  input  logic signed [DW-1:0] in_r [4],
  input  logic signed [DW-1:0] in_i [4],
  input  logic [3:0]           rx_valid,
  output logic signed [DW-1:0] out_r,
  output logic signed [DW-1:0] out_i,
  output logic                 out_valid,
  output logic [3:0]           active
);
  typedef enum logic [1:0] {S0_IDLE, S1_WAIT, S2_READ, S3_GAP} state_t;
  state_t state;

  logic [AW-1:0] wa [4];
  logic [AW-1:0] ra;
  logic          rd_en;
  logic [$clog2(NMSG + GAP + WAIT)-1:0] cnt;
  logic [$clog2(NSYM + 1)-1:0] sym;
  logic [3:0]    sel_valid;
  logic signed [DW-1:0] rd_r [4];
  logic signed [DW-1:0] rd_i [4];
  logic signed [DW-1:0] m_r [4];
  logic signed [DW-1:0] m_i [4];

  assign sel_valid = in_valid & rx_valid;
  assign rd_en     = (state == S2_READ);

  for (genvar c = 0; c < 4; c++) begin : g_chan
    always_ff @(posedge clk) begin
      if (sclr) wa[c] <= '0;
      else if (in_valid[c]) wa[c] <= (32'(wa[c]) == FRAME_WR - 1) ? '0 : wa[c] + 1'b1;
    end
    sdp_ram #(.W(DW), .AW(AW)) u_ram_r (
      .clk, .we(in_valid[c]), .waddr(wa[c]), .wdata(in_r[c]), .re(rd_en), .raddr(ra), .rdata(rd_r[c]));
    sdp_ram #(.W(DW), .AW(AW)) u_ram_i (
      .clk, .we(in_valid[c]), .waddr(wa[c]), .wdata(in_i[c]), .re(rd_en), .raddr(ra), .rdata(rd_i[c]));
    assign m_r[c] = active[c] ? rd_r[c] : '0;
    assign m_i[c] = active[c] ? rd_i[c] : '0;
  end

  always_ff @(posedge clk) begin
    if (sclr) begin
      state <= S0_IDLE; cnt <= '0; sym <= '0; ra <= '0; active <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= rd_en;
      unique case (state)
        S0_IDLE: if (|sel_valid) begin
          state <= S1_WAIT; cnt <= '0;
        end
        S1_WAIT: begin
          cnt <= cnt + 1'b1;
          if (32'(cnt) == WAIT - 1) begin
            state <= S2_READ; cnt <= '0; ra <= '0; sym <= '0;
            active <= sel_valid;
          end
        end
        S2_READ: begin
          cnt <= cnt + 1'b1;
          ra  <= ra + 1'b1;
          if (32'(cnt) == NMSG - 1) begin
            cnt <= '0;
            sym <= sym + 1'b1;
            state <= (32'(sym) == NSYM - 1) ? S0_IDLE : S3_GAP;
          end
        end
        S3_GAP: begin
          cnt <= cnt + 1'b1;
          if (32'(cnt) == GAP - 1) begin
            state <= S2_READ; cnt <= '0;
          end
        end
        default: state <= S0_IDLE;
      endcase
    end
  end

  clip_tree #(.W(DW)) u_clip_r (.in1(m_r[0]), .in2(m_r[1]), .in3(m_r[2]), .in4(m_r[3]), .out(out_r));
  clip_tree #(.W(DW)) u_clip_i (.in1(m_i[0]), .in2(m_i[1]), .in3(m_i[2]), .in4(m_i[3]), .out(out_i));
endmodule

// topfsm_ctrl: the receiver's central control block (a Mealy FSM).
//   S0 SEARCH : wait for packet from the preamble detector.
//   S1 PHASE  : clr pulses in the first cycle (clears the detector for the
//               next frame); wait VLAT cycles for the vectoring CORDIC.
//   S2 FREQ   : freq_enable (cordic_ready) starts freq_correct; wait until its
//               first sine/cosine is FC_LAT cycles away.
//   S3 READ   : mem_rd_en reads FRAME samples from memstore, arriving at
//               freq_correct_mult together with the matching sine/cosine.
//   frame_done pulses at the end of S3 and the FSM returns to S0.
// freq_enable stays high for exactly FRAME cycles from S2 on, so the enable
// that freq_correct delays by FC_LAT covers exactly the samples read in S3.
module topfsm_ctrl #(
  parameter int VLAT   = 21,
  parameter int FC_LAT = 22,
  parameter int FRAME  = 4864
) (
  input  logic clk,
  input  logic sclr,
  input  logic packet,
  output logic clr,
  output logic freq_enable,
  output logic mem_rd_en,
  output logic frame_done
);
  typedef enum logic [1:0] {S0_SEARCH, S1_PHASE, S2_FREQ, S3_READ} state_t;
  state_t state;
  logic [$clog2(FRAME+VLAT+FC_LAT+1)-1:0] cnt, fe_cnt;
  logic first;

  always_ff @(posedge clk) begin
    if (sclr) begin
      state <= S0_SEARCH; cnt <= '0; first <= 1'b0;
      freq_enable <= 1'b0; fe_cnt <= '0; frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      first      <= 1'b0;
      if (freq_enable) begin
        fe_cnt <= fe_cnt + 1'b1;
        if (32'(fe_cnt) == FRAME - 1) freq_enable <= 1'b0;
      end
      unique case (state)
        S0_SEARCH: if (packet) begin
          state <= S1_PHASE; cnt <= '0; first <= 1'b1;
        end
        S1_PHASE: begin
          cnt <= cnt + 1'b1;
          if (32'(cnt) == VLAT - 1) begin
            state <= S2_FREQ; cnt <= '0;
            freq_enable <= 1'b1; fe_cnt <= '0;
          end
        end
        S2_FREQ: begin
          cnt <= cnt + 1'b1;
          if (32'(cnt) == FC_LAT - 2) begin
            state <= S3_READ; cnt <= '0;
          end
        end
        S3_READ: begin
          cnt <= cnt + 1'b1;
          if (32'(cnt) == FRAME - 1) begin
            state <= S0_SEARCH; cnt <= '0; frame_done <= 1'b1;
          end
        end
        default: state <= S0_SEARCH;
      endcase
    end
  end

  assign clr       = first;
  assign mem_rd_en = (state == S3_READ);
endmodule

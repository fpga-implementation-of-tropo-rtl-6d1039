// Testbench for mimo_combiner. Frame 1: chains 0-2 carry data with skews of
// 0, 3 and 7 cycles, chain 3 is silent, and chain 1 is disabled by rx_valid,
// so the output must be chain 0 + chain 2. Frame 2: all four chains carry
// large values, so the saturating adders clip. Each chain sends 9 bursts of
// 384 values with 192 idle cycles between them. The output must be 9 bursts
// of 384 with 192-cycle gaps, equal to a saturating-sum reference.
`include "tb/tb_util.svh"
module tb_mimo_combiner;
  `TB_COUNTERS
  localparam int N = 3456, SYM = 576, NMSG = 384;
  logic clk = 0, sclr = 1, out_valid;
  logic [3:0] in_valid = 0, rx_valid = 0, active;
  logic signed [15:0] in_r [4], in_i [4], out_r, out_i;
  logic signed [15:0] dr [4][N], di [4][N];
  logic [3:0] use_ch;
  int skew [4] = '{0, 3, 7, 5};
  int nout, nsat, bursts, blen, gap;
  bit prev_v;
  always #5 clk = ~clk;
  mimo_combiner dut (.*);
  function automatic logic signed [15:0] csat(input int v);
    return 16'(v > 32767 ? 32767 : (v < -32768 ? -32768 : v));
  endfunction
  function automatic logic signed [15:0] comb(input int a, b, c, d);
    return csat(int'(csat(a + b)) + int'(csat(c + d)));
  endfunction
  `TB_WATCHDOG(20000)
  always @(posedge clk) if (!sclr) begin
    if (out_valid) begin
      int a [4], b [4];
      logic signed [15:0] er, ei;
      for (int c = 0; c < 4; c++) begin
        a[c] = use_ch[c] ? int'(dr[c][nout]) : 0;
        b[c] = use_ch[c] ? int'(di[c][nout]) : 0;
      end
      er = comb(a[0], a[1], a[2], a[3]);
      ei = comb(b[0], b[1], b[2], b[3]);
      if (er != 16'(a[0] + a[1] + a[2] + a[3])) nsat++;
      `CHECK(out_r == er && out_i == ei, $sformatf("output %0d", nout))
      if (!prev_v && nout > 0) `CHECK(gap == SYM - NMSG, "gap between symbols")
      nout++; blen++; gap = 0;
    end else begin
      if (prev_v) begin `CHECK(blen == NMSG, "burst length"); bursts++; end
      blen = 0; gap++;
    end
    prev_v = out_valid;
  end
  task automatic run_frame(input logic [3:0] present, input logic [3:0] rxv, input int amp);
    for (int c = 0; c < 4; c++)
      for (int n = 0; n < N; n++) begin
        dr[c][n] = 16'(int'($urandom % (2 * amp)) - amp);
        di[c][n] = 16'(int'($urandom % (2 * amp)) - amp);
      end
    use_ch = present & rxv; rx_valid = rxv;
    nout = 0; bursts = 0; blen = 0; gap = 0;
    for (int t = 0; t < 9 * SYM + 10; t++) begin
      for (int c = 0; c < 4; c++) begin
        int u = t - skew[c];
        if (present[c] && u >= 0 && u < 9 * SYM && (u % SYM) < NMSG) begin
          in_valid[c] = 1;
          in_r[c] = dr[c][(u / SYM) * NMSG + u % SYM];
          in_i[c] = di[c][(u / SYM) * NMSG + u % SYM];
        end else begin
          in_valid[c] = 0; in_r[c] = 16'($urandom); in_i[c] = 16'($urandom);
        end
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (SYM) @(negedge clk);
    `CHECK(active == use_ch, "active chains latched")
    `CHECK(nout == N && bursts == 9, "nine bursts of output")
  endtask
  initial begin
    for (int c = 0; c < 4; c++) begin in_r[c] = 0; in_i[c] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) sclr = 0;
    nsat = 0;
    run_frame(4'b0111, 4'b1101, 8000);
    `CHECK(nsat == 0, "no clipping at low amplitude")
    repeat (50) @(negedge clk);
    run_frame(4'b1111, 4'b1111, 30000);
    `CHECK(nsat > 0, "clipping exercised")
    `TB_FINISH
  end
endmodule

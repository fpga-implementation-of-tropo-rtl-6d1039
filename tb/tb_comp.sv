// Testbench for comp: a synthetic metric profile. A run above threshold that
// is shorter than SAFETY must not fire; a longer run fires when it ends (or
// after RUN_MAX samples) and reports the cross-correlation and tcount of its
// peak. clr re-arms; a second run after clr fires again.
`include "tb/tb_util.svh"
module tb_comp;
  `TB_COUNTERS
  localparam int ACC_W = 39, AW = 8, SAFETY = 4;
  logic clk = 0, sclr = 1, clr = 0, packet;
  logic signed [ACC_W-1:0] ac1, ac2, ccr, cci, cc_r, cc_i;
  logic [15:0] threshold = 16'd32768;   // 0.5
  logic [AW-1:0] tcount = 0, location;
  int npk = 0;
  logic [AW-1:0] peak_t;
  always #5 clk = ~clk;
  always @(posedge clk) tcount <= tcount + 1'b1;
  always @(negedge clk) if (packet) npk++;
  comp #(.ACC_W(ACC_W), .AW(AW), .SAFETY(SAFETY)) dut (.*);
  `TB_WATCHDOG(5000)
  // metric = (m/1000)^2 with ac1 = ac2 = 1000000
  task automatic drive(input int m);
    @(negedge clk);
    ac1 = 1000000; ac2 = 1000000; ccr = 39'(m * 1000); cci = 0;
  endtask
  initial begin
    ac1 = 0; ac2 = 0; ccr = 0; cci = 0;
    repeat (3) @(posedge clk);
    sclr = 0;
    repeat (5) drive(100);
    // short run: 3 cycles above 0.5 (m > 708)
    drive(800); drive(900); drive(850);
    repeat (5) drive(300);
    `CHECK(npk == 0, "short run does not fire")
    // long run with a peak at its second cycle
    drive(800); drive(990);
    peak_t = tcount;
    drive(900); drive(850);
    `CHECK(npk == 0, "not yet fired after SAFETY-1 samples")
    drive(300); @(negedge clk); #1;
    `CHECK(packet == 1, "fires when a long enough run ends")
    `CHECK(cc_r == 39'(990000) && cc_i == 0, "cross-correlation of the peak")
    `CHECK(location == peak_t, "location of the peak")
    repeat (6) drive(950);
    drive(300); @(negedge clk); #1;
    `CHECK(npk == 2, "a new run after a drop fires again")
    // a run that never drops fires once when it reaches RUN_MAX samples
    repeat (66) drive(950);
    #1;
    `CHECK(npk == 3, "fires once per RUN_MAX samples")
    drive(300); drive(300); #1;
    `CHECK(npk == 3, "the short remainder of the run does not fire")
    @(negedge clk) clr = 1; @(negedge clk) clr = 0;
    drive(990); drive(995); drive(991); drive(992);
    drive(100); @(negedge clk); #1;
    `CHECK(npk == 4, "re-armed by clr")
    `CHECK(cc_r == 39'(995000), "second peak")
    // zero energy never detects
    ac1 = 0; ac2 = 0; ccr = 0; cci = 0;
    repeat (8) @(negedge clk);
    `CHECK(npk == 4, "no detection on silence")
    `TB_FINISH
  end
endmodule

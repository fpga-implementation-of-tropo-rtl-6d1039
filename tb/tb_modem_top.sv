// End-to-end testbench for modem_top at its default sizes.
//
// Receive path, two frames. A random message of 576 bytes per frame is
// scrambled (the inverse of the receiver's descrambler), taken as the
// systematic part of 6912 coded bits, QPSK-mapped onto the 384 data positions
// of each of 9 OFDM symbols (every 4th of the 512 positions is a pilot), and
// sent with a preamble and a carrier frequency offset. The receiver must
// detect the frame, remove the offset and the cyclic prefixes and deliver 9
// bursts of 512 samples. Stand-ins for the parts built elsewhere then close
// the loop: channel estimation/correction removes the common phase using the
// pilots and feeds the 384 data values of each symbol to four receive chains
// (with different gains and arrival skews; one chain is disabled or silent);
// the combined stream is turned into 7-bit LLRs of the systematic bits, three
// per decoder word, which the output interface packs, descrambles and stores.
// The bytes read from it must equal the message.
//
// Transmit path, in parallel: 2304 coded bits go through the SC-FDMA
// transmitter; the 1866-word frame is compared with a reference. The frame is
// looped back into the SC-FDMA receiver buffer, which is told where its
// preamble ended; the pilots and the three symbols it sends to an FFT
// stand-in (which echoes them) must be the transmitted ones.
//
// Each mechanism is counted; one that never happened is a failure.
`include "tb/tb_util.svh"
module tb_modem_top;
  `TB_COUNTERS
  `include "tb/ofdm_gen.svh"
  localparam int AMPL = 4000, NDS = 384, NQ = 9 * NDS, NCODED = 2 * NQ;
  localparam int NMSG = 4608, NBYTES = NMSG / 8, NWORDS = NMSG / 3;
  localparam int SYMP = 576;

  // mechanisms
  localparam int M_DETECT = 0, M_CP_SKIP = 1, M_FREQ = 2, M_CE_GAP = 3, M_CE_TAIL = 4,
                 M_SKEW = 5, M_MASK = 6, M_CLIP = 7, M_PACK = 8, M_THRESH = 9,
                 M_EMPTY = 10, M_SC_HDR = 11, M_SC_CP = 12, M_SC_PILOT = 13, M_SC_PAD = 14,
                 M_SC_RX_CEM = 15, M_SC_RX_SYM = 16, M_N = 17;
  string mname [M_N] = '{"preamble detected", "first cyclic prefix skipped",
    "frequency offset corrected", "64-cycle gap between symbols",
    "last symbol read after the frame ended", "chains aligned despite skew",
    "disabled chain masked", "combiner clipped", "bytes packed",
    "byte threshold reached", "byte FIFO emptied", "SC-FDMA header",
    "SC-FDMA cyclic prefix", "SC-FDMA pilot", "SC-FDMA pad symbol",
    "SC-FDMA pilots released", "SC-FDMA symbol through the FFT"};
  int mech [M_N];

  logic clk = 0, sclr = 1;
  always #5 clk = ~clk;

  logic signed [15:0] rx_r = 0, rx_i = 0, ce_r, ce_i, ldpc_r, ldpc_i, tx_i, tx_q;
  logic [15:0] threshold = 16'd45875;
  logic ce_valid, packet, frame_done, ldpc_valid, byte_valid, bytes_ready, bytes_empty;
  logic [3:0] cc_valid = 0, rx_chan_en = 0, chains_active;
  logic signed [15:0] cc_r [4], cc_i [4];
  logic [20:0] dec_llr = 0;
  logic byte_rd, dec_valid = 0, enc_send = 0, enc_valid = 0, enc_take, tx_valid;
  logic [1:0] enc_bits = 0;
  logic [7:0] byte_out;

  logic signed [15:0] sc_rx_r, sc_rx_i, sc_cem_r, sc_cem_i, sc_fft_in_r, sc_fft_in_i;
  logic signed [15:0] sc_fft_out_r = 0, sc_fft_out_i = 0, sc_sym_r, sc_sym_i;
  logic sc_rx_enable = 0, sc_fft_start = 0, sc_fft_ready = 0;
  logic [10:0] sc_rx_location = 0;
  int sc_wa = 0, sc_w0 = -1;            // buffer write address; address of word 0
  logic sc_cem_valid, sc_fft_in_valid, sc_fft_in_first, sc_sym_valid, sc_rx_done;

  modem_top dut (.*);

  `TB_WATCHDOG(100000)

  // ---------------- reference data ----------------
  logic [7:0]  msg [2][NBYTES];
  logic        cbits [2][NCODED];
  logic [63:0] scr = 64'hACE1_2468_1357_9BDF;   // scrambler state
  logic [7:0]  exp_bytes [$];

  function automatic logic [7:0] rev8(input logic [7:0] b);
    for (int i = 0; i < 8; i++) rev8[i] = b[7-i];
  endfunction

  // ---------------- receive-side monitors ----------------
  int ce_n, ce_gap, ce_worst, ce_bad;
  bit ce_prev, frame_over;
  int ce_buf_r [9 * 512], ce_buf_i [9 * 512];
  real cr, ci;
  always @(posedge clk) if (!sclr) begin
    if (packet) mech[M_DETECT]++;
    if (frame_done) frame_over = 1;
    if (ce_valid) begin
      int s, k, er, ei, dr, di;
      s = ce_n / 512; k = ce_n % 512;
      er = int'(sym_r[s][k] * cr - sym_i[s][k] * ci);
      ei = int'(sym_r[s][k] * ci + sym_i[s][k] * cr);
      dr = int'(ce_r) - er; di = int'(ce_i) - ei;
      if (dr < 0) dr = -dr;
      if (di < 0) di = -di;
      if (dr > ce_worst) ce_worst = dr;
      if (di > ce_worst) ce_worst = di;
      // 8 LSB, plus the drift of a 3e-5 rad error in the 32-sample phase
      if (real'(dr > di ? dr : di) > 8.0 + 5657.0 * 3e-5 / 32.0 * (544 * s + k)) ce_bad++;
      if (ce_n == 0 && dr <= 8 && di <= 8) mech[M_CP_SKIP]++;
      if (!ce_prev && ce_n > 0) begin
        `CHECK(ce_gap == 64, "gap between symbols")
        mech[M_CE_GAP]++;
      end
      if (frame_over) mech[M_CE_TAIL]++;
      ce_buf_r[ce_n] = int'(ce_r); ce_buf_i[ce_n] = int'(ce_i);
      ce_n++; ce_gap = 0;
    end else ce_gap++;
    ce_prev = ce_valid;
  end

  // combiner output, checked against a saturating sum of the chain inputs
  int ch_r [4][NQ], ch_i [4][NQ];
  logic [3:0] use_ch;
  int ld_n;
  int ld_r [NQ], ld_i [NQ];
  function automatic int csat(input int v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction
  always @(posedge clk) if (!sclr) begin
    if (ldpc_valid) begin
      int a [4], b [4], er, ei;
      for (int c = 0; c < 4; c++) begin
        a[c] = use_ch[c] ? ch_r[c][ld_n] : 0;
        b[c] = use_ch[c] ? ch_i[c][ld_n] : 0;
      end
      er = csat(csat(a[0] + a[1]) + csat(a[2] + a[3]));
      ei = csat(csat(b[0] + b[1]) + csat(b[2] + b[3]));
      `CHECK(int'(ldpc_r) == er && int'(ldpc_i) == ei, $sformatf("combined value %0d", ld_n))
      if (er != a[0] + a[1] + a[2] + a[3]) mech[M_CLIP]++;
      ld_r[ld_n] = int'(ldpc_r); ld_i[ld_n] = int'(ldpc_i);
      ld_n++;
    end
  end

  // byte reader: reads while the threshold flag is up, or when draining
  bit drain;
  int nbytes;
  assign byte_rd = bytes_ready || (drain && !bytes_empty);
  always @(posedge clk) if (!sclr) begin
    if (bytes_ready) mech[M_THRESH]++;
    if (byte_valid) begin
      `CHECK(exp_bytes.size() > 0 && byte_out == exp_bytes.pop_front(), $sformatf("message byte %0d", nbytes))
      nbytes++;
    end
  end

  // ---------------- receive path, one frame ----------------
  task automatic rx_frame(input int f, input real omega, input real phi0,
                          input int gain [4], input logic [3:0] present, input logic [3:0] en);
    int d;
    int skew [4] = '{0, 2, 5, 7};
    // message, scrambling, coded bits
    for (int b = 0; b < NBYTES; b++) begin
      logic [7:0] sb;
      msg[f][b] = 8'($urandom);
      exp_bytes.push_back(msg[f][b]);
      sb = msg[f][b] ^ rev8(scr[7:0]);
      scr = {scr[62:0], scr[63] ^ scr[62] ^ scr[60] ^ scr[59]};
      for (int i = 0; i < 8; i++) cbits[f][8 * b + i] = sb[7 - i];
    end
    for (int i = NMSG; i < NCODED; i++) cbits[f][i] = 1'($urandom_range(1, 0));
    // OFDM symbols: pilot (+A,+A) at every 4th position, data elsewhere
    d = 0;
    for (int s = 0; s < 9; s++)
      for (int k = 0; k < 512; k++)
        if (k % 4 == 0) begin sym_r[s][k] = AMPL; sym_i[s][k] = AMPL; end
        else begin
          sym_r[s][k] = cbits[f][2 * d] ? -AMPL : AMPL;
          sym_i[s][k] = cbits[f][2 * d + 1] ? -AMPL : AMPL;
          d++;
        end
    gen_frame(250, 400, AMPL, omega, phi0, 1);
    cr = $cos(omega * first_data + phi0); ci = $sin(omega * first_data + phi0);
    ce_n = 0; ce_worst = 0; ce_bad = 0; frame_over = 0;
    for (int n = 0; n < rx_r_q.size(); n++) begin
      rx_r = 16'(rx_r_q[n]); rx_i = 16'(rx_i_q[n]);
      @(negedge clk);
    end
    rx_r = 0; rx_i = 0;
    repeat (300) @(negedge clk);
    `CHECK(ce_n == 9 * 512, $sformatf("frame %0d: 9 symbols to channel estimation (%0d)", f, ce_n))
    `CHECK(ce_bad == 0, $sformatf("frame %0d: %0d samples off, worst %0d LSB", f, ce_bad, ce_worst))
    if (ce_bad == 0 && omega != 0.0) mech[M_FREQ]++;

    // channel estimation/correction stand-in: common phase from the pilots
    d = 0;
    for (int s = 0; s < 9; s++) begin
      real pr = 0, pq = 0, ph, c0, s0;
      for (int k = 0; k < 512; k += 4) begin
        pr += ce_buf_r[512 * s + k] * sym_r[s][k] + ce_buf_i[512 * s + k] * sym_i[s][k];
        pq += ce_buf_i[512 * s + k] * sym_r[s][k] - ce_buf_r[512 * s + k] * sym_i[s][k];
      end
      ph = $atan2(pq, pr); c0 = $cos(ph); s0 = $sin(ph);
      for (int k = 0; k < 512; k++) if (k % 4 != 0) begin
        real vr, vi;
        vr = ce_buf_r[512 * s + k] * c0 + ce_buf_i[512 * s + k] * s0;
        vi = ce_buf_i[512 * s + k] * c0 - ce_buf_r[512 * s + k] * s0;
        for (int c = 0; c < 4; c++) begin
          ch_r[c][d] = csat(int'(vr * gain[c]));
          ch_i[c][d] = csat(int'(vi * gain[c]));
        end
        d++;
      end
    end

    // four receive chains into the combiner
    use_ch = present & en; rx_chan_en = en; ld_n = 0;
    for (int t = 0; t < 9 * SYMP + 10; t++) begin
      for (int c = 0; c < 4; c++) begin
        int u = t - skew[c];
        if (present[c] && u >= 0 && u < 9 * SYMP && (u % SYMP) < NDS) begin
          cc_valid[c] = 1;
          cc_r[c] = 16'(ch_r[c][(u / SYMP) * NDS + u % SYMP]);
          cc_i[c] = 16'(ch_i[c][(u / SYMP) * NDS + u % SYMP]);
        end else begin
          cc_valid[c] = 0; cc_r[c] = 16'($urandom); cc_i[c] = 16'($urandom);
        end
      end
      @(negedge clk);
    end
    cc_valid = 0;
    repeat (SYMP) @(negedge clk);
    `CHECK(ld_n == NQ, $sformatf("frame %0d: %0d combined values", f, ld_n))
    `CHECK(chains_active == use_ch, "active chains")
    if (ld_n == NQ && (present & ~en) != 0) mech[M_MASK]++;
    if (ld_n == NQ && $countones(use_ch) > 1) mech[M_SKEW]++;

    // decoder stand-in: 7-bit LLRs of the systematic bits, 3 per word
    for (int w = 0; w < NWORDS; w++) begin
      for (int j = 0; j < 3; j++) begin
        int i, v, l;
        i = 3 * w + j;
        v = (i % 2 == 0) ? ld_r[i / 2] : ld_i[i / 2];
        l = v >>> 9;
        if (l > 63) l = 63;
        if (l < -64) l = -64;
        dec_llr[20 - 7 * j -: 7] = 7'(l);
      end
      while ($urandom_range(3, 0) == 0) begin dec_valid = 0; @(negedge clk); end
      dec_valid = 1;
      @(negedge clk);
    end
    dec_valid = 0;
    repeat (10) @(negedge clk);
    drain = 1;
    while (!bytes_empty || byte_valid) @(negedge clk);
    repeat (3) @(negedge clk);
    drain = 0;
    if (bytes_empty) mech[M_EMPTY]++;
  endtask

  // ---------------- transmit path ----------------
  localparam logic signed [15:0] TA = 16'sd11585;
  logic [31:0] tx_exp [1866];
  int tx_n;
  int tx_kind [1866];   // 0 data, 1 header, 2 prefix, 3 pilot, 4 pad
  always @(posedge clk) if (!sclr && tx_valid) begin
    `CHECK(tx_n < 1866 && {tx_i, tx_q} == tx_exp[tx_n], $sformatf("SC-FDMA word %0d", tx_n))
    if (tx_n < 1866 && {tx_i, tx_q} == tx_exp[tx_n])
      case (tx_kind[tx_n])
        1: mech[M_SC_HDR]++;
        2: mech[M_SC_CP]++;
        3: mech[M_SC_PILOT]++;
        4: mech[M_SC_PAD]++;
        default: ;
      endcase
    if (tx_n == 0) sc_w0 = sc_wa;
    tx_n++;
  end

  task automatic tx_frame();
    logic [15:0] lf = 16'hACE1;
    logic hb [320];
    logic [31:0] seq [160];
    logic [31:0] sym [3][512];
    int kind [3][512];
    int d = 0;
    for (int j = 0; j < 320; j++) begin
      hb[j] = lf[0];
      lf = {lf[14:0], lf[15] ^ lf[13] ^ lf[12] ^ lf[10]};
    end
    for (int n = 0; n < 160; n++) seq[n] = {hb[2*n] ? -TA : TA, hb[2*n+1] ? -TA : TA};
    for (int k = 0; k < 234; k++) tx_kind[k] = 1;
    for (int k = 0; k < 10; k++)  tx_exp[k] = seq[22 + k];
    for (int k = 0; k < 64; k++)  tx_exp[10 + k] = seq[k % 32];
    for (int k = 0; k < 32; k++)  tx_exp[74 + k] = seq[128 + k];
    for (int k = 0; k < 128; k++) tx_exp[106 + k] = seq[32 + k];
    for (int s = 0; s < 3; s++)
      for (int p = 0; p < 512; p++)
        if (p % 16 == 0) begin sym[s][p] = {TA, -TA}; kind[s][p] = 3; end
        else begin
          if (d < 1152) begin
            sym[s][p] = {cbits[0][2*d] ? -TA : TA, cbits[0][2*d+1] ? -TA : TA}; kind[s][p] = 0;
          end else begin
            sym[s][p] = {TA, TA}; kind[s][p] = 4;
          end
          d++;
        end
    for (int s = 0; s < 3; s++)
      for (int p = 0; p < 544; p++) begin
        tx_exp[234 + 544 * s + p] = sym[s][p < 32 ? 480 + p : p - 32];
        tx_kind[234 + 544 * s + p] = p < 32 ? 2 : kind[s][p - 32];
      end
    tx_n = 0;
    enc_send = 1;
    while (!enc_take) @(negedge clk);
    enc_send = 0;
    for (int n = 0; n < 1152; n++) begin
      enc_bits = {cbits[0][2*n+1], cbits[0][2*n]}; enc_valid = 1; @(negedge clk);
    end
    enc_valid = 0;
    while (tx_n < 1866) @(negedge clk);
    repeat (10) @(negedge clk);
    `CHECK(tx_n == 1866, "one SC-FDMA frame")
  endtask

  // ---------------- SC-FDMA loopback into the receiver buffer ----------------
  assign sc_rx_r = tx_i;
  assign sc_rx_i = tx_q;
  int sc_ncem, sc_nin, sc_nout, sc_ndone;
  logic [31:0] sc_fbuf [512];
  always @(posedge clk) begin
    if (sclr) sc_wa <= 0;
    else begin
      sc_wa <= sc_wa + 1;
      if (sc_cem_valid) begin
        `CHECK(sc_ncem < 128 && {sc_cem_r, sc_cem_i} == tx_exp[106 + sc_ncem],
               $sformatf("SC-FDMA pilot %0d released", sc_ncem))
        if (sc_ncem < 128 && {sc_cem_r, sc_cem_i} == tx_exp[106 + sc_ncem]) mech[M_SC_RX_CEM]++;
        sc_ncem++;
      end
      if (sc_fft_in_valid) begin
        int sy, k;
        sy = sc_nin / 512; k = sc_nin % 512;
        `CHECK(sy < 3 && {sc_fft_in_r, sc_fft_in_i} == tx_exp[234 + 544 * sy + 32 + k],
               $sformatf("SC-FDMA symbol %0d sample %0d to the FFT", sy, k))
        sc_fbuf[k] = {sc_fft_in_r, sc_fft_in_i};
        sc_nin++;
      end
      if (sc_sym_valid) begin
        `CHECK({sc_sym_r, sc_sym_i} == tx_exp[234 + 544 * (sc_nout / 512) + 32 + sc_nout % 512],
               $sformatf("SC-FDMA FFT result %0d", sc_nout))
        sc_nout++;
        if (sc_nout % 512 == 0) mech[M_SC_RX_SYM]++;
      end
      if (sc_rx_done) sc_ndone++;
    end
  end

  // FFT stand-in: echoes each 512-sample symbol 20 cycles after taking it
  int sc_got = 0;
  initial forever begin
    @(negedge clk);
    if (sc_fft_in_valid) sc_got++;
    if (sc_got == 512) begin
      sc_got = 0;
      repeat (20) @(negedge clk);
      sc_fft_ready = 1;
      @(negedge clk) sc_fft_ready = 0;
      for (int k = 0; k < 512; k++) begin
        {sc_fft_out_r, sc_fft_out_i} = sc_fbuf[k];
        @(negedge clk);
      end
    end
  end

  // plays the SC-FDMA receiver's preamble detector: a few cycles after the
  // preamble (words 10..73) it gives the address of word 74
  task automatic sc_rx_frame();
    sc_ncem = 0; sc_nin = 0; sc_nout = 0; sc_ndone = 0;
    wait (sc_w0 >= 0 && tx_n >= 80);
    @(negedge clk) begin sc_rx_enable = 1; sc_rx_location = 11'(sc_w0 + 74); end
    @(negedge clk) sc_rx_enable = 0;
    wait (sc_ncem == 128);
    repeat (30) @(negedge clk);
    sc_fft_start = 1;
    @(negedge clk) sc_fft_start = 0;
    wait (sc_ndone == 1);
    repeat (5) @(negedge clk);
    `CHECK(sc_ncem == 128 && sc_nin == 3 * 512 && sc_nout == 3 * 512,
           $sformatf("SC-FDMA receiver buffer: %0d pilots, %0d into and %0d out of the FFT",
                     sc_ncem, sc_nin, sc_nout))
  endtask

  initial begin
    static int g0 [4] = '{1, 3, 6, 1};
    static int g1 [4] = '{1, 1, 1, 1};
    for (int c = 0; c < 4; c++) begin cc_r[c] = 0; cc_i[c] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) sclr = 0;
    // frame 0: chain 3 disabled, large gains make the combiner clip
    // frame 1: chain 2 silent, all enabled
    fork
      rx_frame(0, 0.004, 0.5, g0, 4'b1111, 4'b0111);
      begin
        // the transmitter uses frame 0's coded bits once they exist
        repeat (10) @(negedge clk);
        fork
          tx_frame();
          sc_rx_frame();
        join
      end
    join
    rx_frame(1, -0.0025, -1.2, g1, 4'b1011, 4'b1111);
    `CHECK(nbytes == 2 * NBYTES, $sformatf("all message bytes (%0d)", nbytes))
    mech[M_PACK] = nbytes / 3;
    `CHECK(mech[M_DETECT] == 2, "two detections")
    for (int m = 0; m < M_N; m++) begin
      $display("mechanism %-40s %0d", mname[m], mech[m]);
      `CHECK(mech[m] > 0, $sformatf("mechanism never happened: %s", mname[m]))
    end
    `TB_FINISH
  end
endmodule

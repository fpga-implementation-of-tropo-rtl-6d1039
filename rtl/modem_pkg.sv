// modem_pkg: constants, sample type and constant functions shared by the
// tropo-scatter OFDM receiver front end and the SC-FDMA transmitter.
//
// Frame numbers (preamble of 64, 9 OFDM symbols of 512 carriers with a
// 32-sample cyclic prefix, SC-FDMA frame of 1866 samples, 16-bit I/Q) follow
// the modem specification. The CORDIC arctangent table and gain constants are
// computed here at elaboration time from their formulas:
//   atan_fx(i, f) = round(atan(2^-i) * 2^f)
//   cordic gain K = prod_i 1/sqrt(1 + 2^-2i)  (about 1/1.647)
// so no table has to be pasted into the source.
package modem_pkg;

  localparam int DW        = 16;    // I/Q sample width
  localparam int CORR_DEPTH= 32;    // Schmidl-Cox correlation depth
  localparam int NFFT      = 512;   // carriers per OFDM symbol
  localparam int CP_LEN    = 32;    // cyclic prefix
  localparam int NSYM      = 9;     // OFDM symbols per frame
  localparam int FRAME_LEN = NFFT + (NFFT + CP_LEN) * (NSYM - 1); // 4864 samples after the first CP

  // QPSK amplitude 1/sqrt(2) in 2.14 format.
  localparam logic signed [DW-1:0] QPSK_AMP = 16'sd11585;

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } sample_t;

  // atan(2^-i) by its power series (i >= 1) or pi/4 (i == 0).
  function automatic real atan_pow2(input int i);
    real x, x2, term, sum;
    if (i == 0) return 0.78539816339744831;
    x = 1.0;
    for (int k = 0; k < i; k++) x = x / 2.0;
    x2 = x * x;
    term = x;
    sum = 0.0;
    for (int k = 0; k < 30; k++) begin
      if (k % 2 == 0) sum = sum + term / real'(2 * k + 1);
      else            sum = sum - term / real'(2 * k + 1);
      term = term * x2;
    end
    return sum;
  endfunction

  function automatic real pow2(input int e);
    real r;
    r = 1.0;
    for (int k = 0; k < e; k++) r = r * 2.0;
    return r;
  endfunction

  // Fixed-point arctangent with f fractional bits.
  function automatic longint atan_fx(input int i, input int f);
    return longint'(atan_pow2(i) * pow2(f));
  endfunction

  // CORDIC gain compensation 1/1.647 for n iterations, with f fractional bits.
  function automatic longint cordic_k_fx(input int n, input int f);
    real k;
    real p;
    k = 1.0;
    p = 1.0;
    for (int i = 0; i < n; i++) begin
      k = k / $sqrt(1.0 + p);
      p = p / 4.0;
    end
    return longint'(k * pow2(f));
  endfunction

  localparam real PI = 3.14159265358979324;

  function automatic longint pi_fx(input int f);
    return longint'(PI * pow2(f));
  endfunction

endpackage

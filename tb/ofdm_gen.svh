// Received OFDM frame model shared by the receiver testbenches (included
// inside a testbench module). The frame is:
//   LEAD random samples (no preamble structure)
//   preamble: a random 32-sample half sent twice
//   9 symbols, each a 32-sample cyclic prefix and 512 samples
//   TRAIL random samples
// Samples are QPSK-like (+-AMPL on each rail). The whole stream is rotated by
// exp(j*(OMEGA*n + PHI0)), a carrier frequency offset of OMEGA rad/sample.
// gen_frame fills rx_r_q/rx_i_q (the stream) and sym_r/sym_i (the symbols
// before rotation; with preset they are taken as already filled by the caller)
// and sets first_data, the stream index of the first sample after the first
// cyclic prefix. Without noise, a random sample next to the preamble can
// continue its periodic pattern by chance and flatten the detection peak;
// the sample just before the preamble and the first sample after it are
// therefore set to the negated neighbouring preamble sample, as a preamble
// designed for a sharp peak would ensure.
localparam int GEN_NFFT = 512, GEN_CP = 32, GEN_NSYM = 9, GEN_HALF = 32;
int   rx_r_q [$], rx_i_q [$];
int   sym_r [GEN_NSYM][GEN_NFFT], sym_i [GEN_NSYM][GEN_NFFT];
int   first_data, pre_end;
real  gen_omega, gen_phi0;

function automatic int qrail(input int ampl);
  return $urandom_range(1, 0) == 1 ? ampl : -ampl;
endfunction

function automatic void push_rot(input int r, input int i, input int ampl);
  real a, cr, ci;
  int n;
  n  = rx_r_q.size();
  a  = gen_omega * n + gen_phi0;
  cr = $cos(a); ci = $sin(a);
  rx_r_q.push_back(int'(r * cr - i * ci));
  rx_i_q.push_back(int'(r * ci + i * cr));
endfunction

function automatic void gen_frame(input int lead, input int trail, input int ampl,
                                  input real omega, input real phi0, input bit preset = 0);
  int hr [GEN_HALF], hi [GEN_HALF];
  rx_r_q.delete(); rx_i_q.delete();
  gen_omega = omega; gen_phi0 = phi0;
  for (int n = 0; n < GEN_HALF; n++) begin hr[n] = qrail(ampl); hi[n] = qrail(ampl); end
  for (int n = 0; n < lead - 1; n++) push_rot(qrail(ampl), qrail(ampl), ampl);
  push_rot(-hr[GEN_HALF-1], -hi[GEN_HALF-1], ampl);
  for (int n = 0; n < 2 * GEN_HALF; n++) push_rot(hr[n % GEN_HALF], hi[n % GEN_HALF], ampl);
  pre_end = rx_r_q.size();
  for (int s = 0; s < GEN_NSYM; s++) begin
    if (!preset)
      for (int k = 0; k < GEN_NFFT; k++) begin sym_r[s][k] = qrail(ampl); sym_i[s][k] = qrail(ampl); end
    if (s == 0) begin sym_r[0][GEN_NFFT-GEN_CP] = -hr[0]; sym_i[0][GEN_NFFT-GEN_CP] = -hi[0]; end
    for (int k = 0; k < GEN_CP; k++) push_rot(sym_r[s][GEN_NFFT-GEN_CP+k], sym_i[s][GEN_NFFT-GEN_CP+k], ampl);
    if (s == 0) first_data = rx_r_q.size();
    for (int k = 0; k < GEN_NFFT; k++) push_rot(sym_r[s][k], sym_i[s][k], ampl);
  end
  for (int n = 0; n < trail; n++) push_rot(qrail(ampl), qrail(ampl), ampl);
endfunction

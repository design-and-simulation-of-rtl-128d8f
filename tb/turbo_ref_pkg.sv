// turbo_ref_pkg: reference models for the testbenches, written independently of the RTL.
//
// rsc_ref_encode() evaluates the RSC recurrences directly on bit histories:
//   a(n) = u(n) ^ a(n-1) ^ a(n-3) ^ a(n-4)      (feedback 1 + D + D^3 + D^4)
//   p(n) = a(n) ^ a(n-2) ^ a(n-3) ^ a(n-4)      (parity   1 + D^2 + D^3 + D^4)
// with a(n) = 0 before the block. map_ref_llr() computes the exact MAP a-posteriori LLR of one
// information bit by enumerating every codeword of a short block (no trellis), in real
// arithmetic and in the same LLR scale as the RTL (4 LSB per nat).
// gauss() returns a standard normal sample (Box-Muller) for the channel model.
package turbo_ref_pkg;

  localparam int MAXK = 64;
  typedef bit bits_t [MAXK];

  function automatic void rsc_ref_encode(input bits_t u, input int k, output bits_t p);
    bit a [MAXK + 4];
    for (int i = 0; i < MAXK + 4; i++) a[i] = 1'b0;
    for (int n = 0; n < k; n++) begin
      // a[n+4] holds a(n); a[0..3] are the zeros before the block
      a[n+4] = u[n] ^ a[n+3] ^ a[n+1] ^ a[n];
      p[n]   = a[n+4] ^ a[n+2] ^ a[n+1] ^ a[n];
    end
  endfunction

  // Exact MAP LLR of bit j: ln sum_{u_j=1} exp(M) - ln sum_{u_j=0} exp(M), with the codeword
  // metric M = sum_n u_n (Ls_n + La_n) + p_n Lp_n, all values in 1/4-nat units.
  function automatic real map_ref_llr(input int ls [MAXK], input int lp [MAXK],
                                      input int la [MAXK], input int k, input int j);
    real s0, s1, m, mmax;
    bits_t u, p;
    mmax = -1.0e30;
    // first pass: largest metric, to keep exp() in range
    for (int w = 0; w < (1 << k); w++) begin
      for (int n = 0; n < k; n++) u[n] = bit'((w >> n) & 1);
      rsc_ref_encode(u, k, p);
      m = 0.0;
      for (int n = 0; n < k; n++) m += (u[n] ? real'(ls[n] + la[n]) : 0.0) + (p[n] ? real'(lp[n]) : 0.0);
      m = m / 4.0;
      if (m > mmax) mmax = m;
    end
    s0 = 0.0;
    s1 = 0.0;
    for (int w = 0; w < (1 << k); w++) begin
      for (int n = 0; n < k; n++) u[n] = bit'((w >> n) & 1);
      rsc_ref_encode(u, k, p);
      m = 0.0;
      for (int n = 0; n < k; n++) m += (u[n] ? real'(ls[n] + la[n]) : 0.0) + (p[n] ? real'(lp[n]) : 0.0);
      m = m / 4.0;
      if (u[j]) s1 += $exp(m - mmax);
      else      s0 += $exp(m - mmax);
    end
    return 4.0 * ($ln(s1) - $ln(s0));
  endfunction

  function automatic real gauss();
    real r1, r2;
    r1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    r2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(r1)) * $cos(6.283185307179586 * r2);
  endfunction

  // Channel LLR of a BPSK symbol (bit 1 sent as +1) received with noise of standard deviation
  // sigma: 2y/sigma^2 nats, in 1/4-nat units, saturated to +-lim.
  function automatic int llr_q(input bit b, input real sigma, input int lim, input bit noisy);
    real y, l;
    int  q;
    y = (b ? 1.0 : -1.0) + (noisy ? sigma * gauss() : 0.0);
    l = 4.0 * 2.0 * y / (sigma * sigma);
    q = (l >= 0.0) ? int'(l + 0.5) : -int'(-l + 0.5);
    if (q > lim)  q = lim;
    if (q < -lim) q = -lim;
    return q;
  endfunction

endpackage

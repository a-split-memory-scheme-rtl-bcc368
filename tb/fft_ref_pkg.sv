// fft_ref_pkg: reference models for the FFT testbenches.
//
// Everything here works on plain arrays indexed by sample position and knows
// nothing of the RAM banks, the routing switches or the schedule of the
// hardware:
//   ref_twiddle  - W_N^k quantised to CW-2 fraction bits, rounded to nearest
//   wrap         - two's-complement wrap of a value to a given width
//   ref_fft_fixed- bit-exact fixed-point model of the constant-geometry
//                  radix-2 DIF FFT: stage s, butterfly k takes positions k
//                  and k+N/2, writes a+b to 2k and (a-b)*W^(2^(s-1)*
//                  floor(k/2^(s-1))) to 2k+1, result returned by frequency
//   ref_dft      - direct floating-point DFT, for a tolerance check
//   bitrev       - bit reversal of an index
package fft_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  typedef longint lvec_t[];
  typedef real    rvec_t[];

  function automatic longint rnd(input real v);
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  function automatic void ref_twiddle(input int n, input int k, input int cw,
                                      output longint wr, output longint wi);
    real ang;
    real scale;
    ang   = 2.0 * PI * real'(k) / real'(n);
    scale = real'(longint'(1) << (cw - 2));
    wr = rnd($cos(ang) * scale);
    wi = rnd(-$sin(ang) * scale);
  endfunction

  function automatic longint wrap(input longint v, input int w);
    longint m;
    m = v & ((longint'(1) << w) - 1);
    if (m >= (longint'(1) << (w - 1))) m = m - (longint'(1) << w);
    return m;
  endfunction

  function automatic int bitrev(input int v, input int bits);
    int r;
    r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  function automatic void ref_fft_fixed(input int n, input int dw, input int cw,
                                        input lvec_t xr, input lvec_t xi,
                                        output lvec_t fr, output lvec_t fi);
    int     logn;
    longint dr[], di[], nr[], ni[];
    longint ar, ai, br, bi, er, ei, wr, wi, half;
    int     e;
    logn = $clog2(n);
    half = longint'(1) << (cw - 3);
    dr = new[n];
    di = new[n];
    nr = new[n];
    ni = new[n];
    for (int i = 0; i < n; i++) begin
      dr[i] = xr[i];
      di[i] = xi[i];
    end
    for (int s = 1; s <= logn; s++) begin
      for (int k = 0; k < n / 2; k++) begin
        ar = dr[k];
        ai = di[k];
        br = dr[k + n / 2];
        bi = di[k + n / 2];
        e  = (k / (1 << (s - 1))) * (1 << (s - 1));
        ref_twiddle(n, e, cw, wr, wi);
        nr[2*k] = wrap(ar + br, dw);
        ni[2*k] = wrap(ai + bi, dw);
        er = ar - br;
        ei = ai - bi;
        nr[2*k+1] = wrap((er * wr - ei * wi + half) >>> (cw - 2), dw);
        ni[2*k+1] = wrap((er * wi + ei * wr + half) >>> (cw - 2), dw);
      end
      for (int i = 0; i < n; i++) begin
        dr[i] = nr[i];
        di[i] = ni[i];
      end
    end
    fr = new[n];
    fi = new[n];
    for (int p = 0; p < n; p++) begin
      fr[bitrev(p, logn)] = dr[p];
      fi[bitrev(p, logn)] = di[p];
    end
  endfunction

  function automatic void ref_dft(input int n, input lvec_t xr, input lvec_t xi,
                                  output rvec_t fr, output rvec_t fi);
    real ang;
    fr = new[n];
    fi = new[n];
    for (int f = 0; f < n; f++) begin
      fr[f] = 0.0;
      fi[f] = 0.0;
      for (int m = 0; m < n; m++) begin
        ang = -2.0 * PI * real'((longint'(m) * f) % longint'(n)) / real'(n);
        fr[f] += real'(xr[m]) * $cos(ang) - real'(xi[m]) * $sin(ang);
        fi[f] += real'(xr[m]) * $sin(ang) + real'(xi[m]) * $cos(ang);
      end
    end
  endfunction

endpackage

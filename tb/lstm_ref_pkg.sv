// Reference model for the testbenches: the LSTM equations evaluated in plain integer
// arithmetic with the same number formats as the RTL (see lstm_pkg), and the activation
// tables computed from $exp, independently of the ROM files the RTL reads.
package lstm_ref_pkg;

  // round-half-up right shift by sh, then clip to a signed ow-bit range
  function automatic longint rq(longint v, int sh, int ow, bit sym = 1'b0);
    longint r, mx, mn;
    r  = (sh > 0) ? ((v + (64'sd1 <<< (sh - 1))) >>> sh) : (v <<< (-sh));
    mx = (64'sd1 <<< (ow - 1)) - 1;
    mn = sym ? -mx : -(64'sd1 <<< (ow - 1));
    if (r > mx) r = mx;
    if (r < mn) r = mn;
    return r;
  endfunction

  function automatic longint rnd_away(real v);
    if (v >= 0.0) return longint'($floor(v + 0.5));
    return -longint'($floor(-v + 0.5));
  endfunction

  // idx: signed LUT index (x = idx/16); result Q0.7
  function automatic int sig_ref(int idx);
    longint v;
    v = rnd_away(128.0 / (1.0 + $exp(-real'(idx) / 16.0)));
    return (v > 127) ? 127 : int'(v);
  endfunction

  function automatic int tanh_ref(int idx);
    real e2;
    longint v;
    e2 = $exp(2.0 * real'(idx) / 16.0);
    v  = rnd_away(128.0 * (e2 - 1.0) / (e2 + 1.0));
    if (v > 127)  v = 127;
    if (v < -127) v = -127;
    return int'(v);
  endfunction

  // One inference. w[g][r*K+k], b[g][r], x[t*IN+k]; all signed 8-bit values held in int.
  // Returns the final h (Q0.7) in h.
  function automatic void lstm_run(int IN, int H, int WIN, const ref int w[4][], const ref int b[4][],
                                   const ref int x[], ref int h[]);
    int K = IN + H;
    int hp[], c[], hn[];
    longint acc [4];
    int a [4];
    hp = new[H]; c = new[H]; hn = new[H];
    foreach (hp[j]) begin hp[j] = 0; c[j] = 0; end
    for (int t = 0; t < WIN; t++) begin
      for (int r = 0; r < H; r++) begin
        longint cs;
        int cn, tc;
        for (int g = 0; g < 4; g++) begin
          acc[g] = longint'(b[g][r]) * 128;
          for (int k = 0; k < K; k++) begin
            int opd = (k < IN) ? x[t*IN+k] : hp[k-IN];
            acc[g] += longint'(w[g][r*K+k]) * opd;
          end
          // 32-bit accumulator wraps like the hardware
          acc[g] = longint'(int'(acc[g]));
          a[g] = int'(rq(acc[g], 9, 8));
          a[g] = (g == 2) ? tanh_ref(a[g]) : sig_ref(a[g]);
        end
        cs = longint'(a[1]) * c[r] + longint'(a[0]) * a[2] * 8;
        cn = int'(rq(cs, 7, 16));
        c[r] = cn;
        tc = tanh_ref(int'(rq(cn, 6, 8)));
        hn[r] = int'(rq(longint'(a[3]) * tc, 7, 8));
      end
      hp = hn;
      hn = new[H];
    end
    h = hp;
  endfunction

  // floor(sqrt(v))
  function automatic longint isqrt_ref(longint v);
    longint r = longint'($floor($sqrt(real'(v))));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  // One fixed-point Adam step of output weight j (master mw Q1.14, moments m1 Q.20, m2 Q.24)
  // for error e (Q3.12) and hidden value hv (Q0.7); returns the re-quantized 8-bit weight.
  function automatic int adam_ref(ref longint mw[], ref longint m1[], ref longint m2[], input int j,
                                  input longint e, input longint hv, input int k1, input int k2,
                                  input int alpha, input int eps);
    longint g, s, q, step;
    g = (e * hv + 64) >>> 7;
    if (g > 32767) g = 32767;
    if (g < -32767) g = -32767;
    m1[j] = m1[j] + ((((g <<< 8) - m1[j]) * k1) >>> 16);
    m1[j] = longint'(int'(m1[j]));
    m2[j] = m2[j] + (((g * g - m2[j]) * k2) >>> 16);
    m2[j] = m2[j] & 64'hffff_ffff;
    s = isqrt_ref(m2[j] + eps);
    q = ((m1[j] < 0) ? -m1[j] : m1[j]) / s;
    if (q > 32767) q = 32767;
    step = (alpha * q + 128) >>> 8;
    mw[j] = (m1[j] < 0) ? mw[j] + step : mw[j] - step;
    if (mw[j] > 32767) mw[j] = 32767;
    if (mw[j] < -32768) mw[j] = -32768;
    return int'(rq(mw[j], 8, 8));
  endfunction

  // min-max normalization to Q3.12 with reciprocal constant recip = round(2^28/range)
  function automatic longint norm_ref(longint u, longint mn, longint recip);
    longint y;
    if (u <= mn) return 0;
    y = ((u - mn) * recip + 32768) >>> 16;
    return (y > 4096) ? 4096 : y;
  endfunction
endpackage

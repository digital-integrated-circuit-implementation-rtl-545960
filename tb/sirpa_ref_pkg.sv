// sirpa_ref_pkg -- reference model of the identification stage for the
// testbenches, written independently of the RTL with plain 64-bit integer
// arithmetic.
//
// Numbers are Q5.19 held in longint. The filter bank model is written as
// the textbook recursive dyadic cascade (each dyad filters, toggles its own
// decimation phase and hands its kept low-pass output to the next dyad),
// not as the RTL's per-sample schedule, so a scheduling mistake in the RTL
// shows up as a mismatch.
package sirpa_ref_pkg;

  localparam longint QMAX = (64'sd1 <<< 23) - 1;
  localparam longint QMIN = -(64'sd1 <<< 23);

  function automatic longint rsat(input longint v);
    return (v > QMAX) ? QMAX : (v < QMIN) ? QMIN : v;
  endfunction

  // product of two Q5.19 numbers, floor to Q5.19, not yet saturated
  function automatic longint rmul(input longint a, input longint b);
    return (a * b) >>> 19;
  endfunction

  // real to Q5.19 (rounded)
  function automatic longint q(input real r);
    return longint'($rtoi(r * 524288.0 + ((r >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // coefficient order: b01 b11 a11 b02 b12 b22 a12 a22
  typedef longint coef8_t [8];

  // One filter step; st holds s0,s1,s2 and is updated.
  function automatic longint iir_step(input longint x, input coef8_t c, ref longint st [3]);
    longint y1, y, n0, n1, n2;
    y1 = rsat(rmul(c[0], x) + st[0]);
    n0 = rsat(rmul(c[1], x) - rmul(c[2], y1));
    y  = rsat(rmul(c[3], y1) + st[1]);
    n1 = rsat(rmul(c[4], y1) - rmul(c[6], y) + st[2]);
    n2 = rsat(rmul(c[5], y1) - rmul(c[7], y));
    st[0] = n0; st[1] = n1; st[2] = n2;
    return y;
  endfunction

  // Butterworth third-order half-band pair (cut-off at a quarter of the
  // sampling rate), the HP obtained from the LP by z -> -z.
  function automatic coef8_t lp_coefs();
    coef8_t c;
    c = '{q(1.0/6.0), q(1.0/6.0), 0, q(1.0), q(2.0), q(1.0), 0, q(1.0/3.0)};
    return c;
  endfunction
  function automatic coef8_t hp_coefs();
    coef8_t c;
    c = '{q(1.0/6.0), -q(1.0/6.0), 0, q(1.0), -q(2.0), q(1.0), 0, q(1.0/3.0)};
    return c;
  endfunction

  // ---------------------------------------------------------- filter bank
  class fb_model;
    int      levels;
    coef8_t  lp, hp;
    longint  st_lp [][3];
    longint  st_hp [][3];
    bit      phase [];          // per dyad: next output is kept
    longint  acc   [];          // per band sum of squares
    int      cnt   [];          // per band number of samples
    // band samples produced by the last push, in production order
    int      out_band [$];
    longint  out_x    [$];
    int      n_in;

    function new(int levels_i, coef8_t lp_i, coef8_t hp_i);
      levels = levels_i; lp = lp_i; hp = hp_i;
      st_lp = new[levels]; st_hp = new[levels];
      phase = new[levels]; acc = new[levels+1]; cnt = new[levels+1];
      foreach (st_lp[k]) begin
        for (int j = 0; j < 3; j++) begin st_lp[k][j] = 0; st_hp[k][j] = 0; end
        phase[k] = 0;
      end
      foreach (acc[b]) begin acc[b] = 0; cnt[b] = 0; end
      n_in = 0;
    endfunction

    local function void band_out(int b, longint x);
      out_band.push_back(b);
      out_x.push_back(x);
      acc[b] += x * x;
      cnt[b] += 1;
    endfunction

    local function void dyad(int k, longint x);
      longint yl, yh;
      longint s [3];
      s = st_lp[k]; yl = iir_step(x, lp, s); st_lp[k] = s;
      s = st_hp[k]; yh = iir_step(x, hp, s); st_hp[k] = s;
      if (phase[k]) begin
        if (k == levels - 1) band_out(0, yl);
        band_out(levels - k, yh);
        if (k < levels - 1) dyad(k + 1, yl);
      end
      phase[k] = !phase[k];
    endfunction

    // push one input sample; returns 1 when this sample closed a frame,
    // in which case e holds the band energies
    function bit push(longint x, ref longint e []);
      out_band.delete();
      out_x.delete();
      dyad(0, x);
      n_in++;
      if (n_in == (1 << levels)) begin
        e = new[levels+1];
        foreach (e[b]) begin
          longint m;
          m = (acc[b] / cnt[b]) >>> 19;
          e[b] = (m > QMAX) ? QMAX : m;
          acc[b] = 0; cnt[b] = 0;
        end
        n_in = 0;
        return 1;
      end
      return 0;
    endfunction
  endclass

  // ------------------------------------------------- dimensional reduction
  function automatic longint proj(input longint x [], input longint mu [],
                                  input longint wrow []);
    longint s;
    s = 0;
    foreach (x[i]) s += wrow[i] * rsat(x[i] - mu[i]);
    return rsat(s >>> 19);
  endfunction

  // ------------------------------------------------------ symbol generator
  function automatic int nearest(input longint y [], input longint c [][]);
    int     best;
    longint bd;
    best = 0; bd = -1;
    foreach (c[k]) begin
      longint d;
      d = 0;
      foreach (y[j]) d += (y[j] > c[k][j]) ? y[j] - c[k][j] : c[k][j] - y[j];
      if (bd < 0 || d < bd) begin bd = d; best = k; end
    end
    return best;
  endfunction

  // --------------------------------------------------------- HMM forward
  // Fixed-point forward algorithm with power-of-two renormalisation;
  // returns log2 P(O|lambda) in units of 1/256, or the most negative
  // 24-bit value when the model cannot produce the sequence.
  function automatic longint hmm_fixed(input longint pi [], input longint a [][],
                                       input longint b [][], input int obs []);
    int     ns;
    longint alpha [], an [];
    longint kk, sum, sum_n;
    bit     dead;
    ns = pi.size();
    alpha = new[ns]; an = new[ns];
    kk = 0; dead = 0; sum_n = 0;
    foreach (obs[t]) begin
      sum = 0;
      for (int j = 0; j < ns; j++) begin
        longint acc, tq, p;
        if (t == 0) acc = pi[j] <<< 19;
        else begin
          acc = 0;
          for (int i = 0; i < ns; i++) acc += alpha[i] * a[i][j];
        end
        tq = rsat(acc >>> 19);
        p  = rsat((tq * b[j][obs[t]]) >>> 19);
        if (p < 0) p = 0;
        an[j] = p;
        sum += p;
      end
      if (sum == 0) begin
        dead = 1;
        foreach (alpha[j]) alpha[j] = 0;
      end else begin
        int msb, k;
        msb = 0;
        for (int bit_i = 0; bit_i < 40; bit_i++) if ((sum >> bit_i) & 1) msb = bit_i;
        k = 18 - msb;
        foreach (alpha[j]) alpha[j] = (k >= 0) ? (an[j] << k) : (an[j] >> -k);
        sum_n = (k >= 0) ? (sum << k) : (sum >> -k);
        kk += k;
      end
    end
    if (dead) return -(64'sd1 <<< 23);
    return (-1 - kk) * 256 + ((sum_n >> 10) & 255);
  endfunction

  // Floating-point forward algorithm, log2 P(O|lambda) (for tolerance checks).
  function automatic real hmm_real(input real pi [], input real a [][],
                                   input real b [][], input int obs []);
    int  ns;
    real alpha [], an [];
    real lg, s;
    ns = pi.size();
    alpha = new[ns]; an = new[ns];
    lg = 0.0;
    foreach (obs[t]) begin
      s = 0.0;
      for (int j = 0; j < ns; j++) begin
        real acc;
        if (t == 0) acc = pi[j];
        else begin
          acc = 0.0;
          for (int i = 0; i < ns; i++) acc += alpha[i] * a[i][j];
        end
        an[j] = acc * b[j][obs[t]];
        s += an[j];
      end
      foreach (alpha[j]) alpha[j] = an[j] / s;
      lg += $ln(s) / $ln(2.0);
    end
    return lg;
  endfunction

endpackage

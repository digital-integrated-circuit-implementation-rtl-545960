// tb_id_accuracy -- accuracy of the fixed-point identification chain
// (filter bank -> band energies -> 8D-to-3D projection) against a
// double-precision model of the same algorithm, on synthetic field-like
// audio: a chainsaw-like buzz (110 Hz fundamental with decaying harmonics,
// amplitude-modulated, plus noise), gunshot-like impulsive bursts with an
// exponential decay, and quiet background noise, one kind per stretch of
// frames. For each band energy and each projected dimension the testbench
// reports the standard deviation of the error relative to the standard
// deviation of the ideal value over all frames, and requires it below 4 %.
// The projection matrix spreads the energies of the eight bands over
// three axes (low, middle, high bands); the mean is the average energy.
module tb_id_accuracy;
  import sirpa_pkg::*;
  import sirpa_ref_pkg::*;

  localparam int FRAMES = 36;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  q_t   in_x = '0;
  logic in_ready, overrun;
  iir_coef_t coef_lp, coef_hp;
  logic band_valid;
  logic [2:0] band_idx;
  q_t band_x;
  q_t energy [8];
  logic e_valid, dr_ready, p_valid;
  q_t mu [8], w [3][8], y [3];

  filter_bank u_fb (.clk, .rst_n, .in_valid, .in_x, .in_ready, .overrun, .coef_lp, .coef_hp,
                    .band_valid, .band_idx, .band_x, .energy, .out_valid(e_valid));
  dim_reduction u_dr (.clk, .rst_n, .in_valid(e_valid), .x(energy), .in_ready(dr_ready),
                      .mu, .w, .y, .out_valid(p_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (FRAMES * 128 * 16 + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ floating-point chain
  real lp_r [8], hp_r [8];
  real st_l [7][3], st_h [7][3];
  bit  ph [7];
  real acc [8];
  int  cnt [8];
  real mu_r [8], w_r [3][8];
  real ie [$][8];     // ideal energies per frame
  real iy [$][3];     // ideal projections per frame

  function automatic real fstep(real x, real c [8], ref real s [3]);
    real y1, yo;
    y1 = c[0] * x + s[0];
    s[0] = c[1] * x - c[2] * y1;
    yo = c[3] * y1 + s[1];
    s[1] = c[4] * y1 - c[6] * yo + s[2];
    s[2] = c[5] * y1 - c[7] * yo;
    return yo;
  endfunction

  function automatic void fdyad(int k, real x);
    real yl, yh;
    real s [3];
    s = st_l[k]; yl = fstep(x, lp_r, s); st_l[k] = s;
    s = st_h[k]; yh = fstep(x, hp_r, s); st_h[k] = s;
    if (ph[k]) begin
      if (k == 6) begin acc[0] += yl * yl; cnt[0]++; end
      acc[7 - k] += yh * yh; cnt[7 - k]++;
      if (k < 6) fdyad(k + 1, yl);
    end
    ph[k] = !ph[k];
  endfunction

  // measured values
  real me [$][8];
  real my [$][3];
  always @(posedge clk) if (rst_n) begin
    if (e_valid) begin
      real v [8];
      for (int b = 0; b < 8; b++) v[b] = real'(energy[b]) / 524288.0;
      me.push_back(v);
    end
    if (p_valid) begin
      real v [3];
      for (int d = 0; d < 3; d++) v[d] = real'(y[d]) / 524288.0;
      my.push_back(v);
    end
  end

  function automatic iir_coef_t to_coef(coef8_t c);
    return '{b01: q_t'(c[0]), b11: q_t'(c[1]), a11: q_t'(c[2]), b02: q_t'(c[3]),
             b12: q_t'(c[4]), b22: q_t'(c[5]), a12: q_t'(c[6]), a22: q_t'(c[7])};
  endfunction

  function automatic real noise(real a);
    return a * (real'($urandom_range(20000)) / 10000.0 - 1.0);
  endfunction

  // standard deviation of the error relative to that of the ideal value
  function automatic real rel_err(real mv [], real iv []);
    real md, mi, sd, si;
    int n;
    n = iv.size();
    md = 0.0; mi = 0.0;
    for (int i = 0; i < n; i++) begin md += mv[i] - iv[i]; mi += iv[i]; end
    md /= n; mi /= n;
    sd = 0.0; si = 0.0;
    for (int i = 0; i < n; i++) begin sd += (mv[i] - iv[i] - md) ** 2; si += (iv[i] - mi) ** 2; end
    return $sqrt(sd / si);
  endfunction

  initial begin
    real t, fs, pi2;
    lp_r = '{1.0/6.0, 1.0/6.0, 0.0, 1.0, 2.0, 1.0, 0.0, 1.0/3.0};
    hp_r = '{1.0/6.0, -1.0/6.0, 0.0, 1.0, -2.0, 1.0, 0.0, 1.0/3.0};
    for (int k = 0; k < 7; k++) begin ph[k] = 0; for (int j = 0; j < 3; j++) begin st_l[k][j] = 0.0; st_h[k][j] = 0.0; end end
    for (int b = 0; b < 8; b++) begin acc[b] = 0.0; cnt[b] = 0; end
    // projection: low bands, middle bands, high bands; gain 8
    for (int b = 0; b < 8; b++) begin
      mu_r[b] = 0.01;
      w_r[0][b] = (b < 3) ? 8.0 : 0.0;
      w_r[1][b] = (b >= 3 && b < 6) ? 8.0 : -2.0;
      w_r[2][b] = (b >= 6) ? 8.0 : 0.0;
      mu[b] = q_t'(q(mu_r[b]));
      for (int d = 0; d < 3; d++) w[d][b] = q_t'(q(w_r[d][b]));
    end
    coef_lp = to_coef(lp_coefs());
    coef_hp = to_coef(hp_coefs());
    repeat (2) @(negedge clk);
    rst_n = 1;
    fs = 44100.0; pi2 = 6.283185307179586;
    for (int s = 0; s < FRAMES * 128; s++) begin
      real xr;
      int kind, fpos;
      t = real'(s) / fs;
      kind = (s / (128 * 6)) % 3;
      fpos = s % (128 * 6);
      case (kind)
        0: begin   // chainsaw-like buzz
          xr = 0.0;
          for (int h = 1; h <= 12; h++) xr += (0.3 / h) * $sin(pi2 * 110.0 * h * t + h);
          xr = xr * (0.8 + 0.2 * $sin(pi2 * 9.0 * t)) + noise(0.02);
        end
        1: xr = (fpos < 2000) ? noise(2.0) * $exp(-real'(fpos) / 300.0) + noise(0.01) : noise(0.01);   // gunshot-like
        default: xr = noise(0.05);   // background
      endcase
      in_x = q_t'(q(xr));
      // the float model sees exactly the quantised input
      fdyad(0, real'(q(xr)) / 524288.0);
      if ((s % 128) == 127) begin
        real e [8], yy [3];
        for (int b = 0; b < 8; b++) begin e[b] = acc[b] / cnt[b]; acc[b] = 0.0; cnt[b] = 0; end
        for (int d = 0; d < 3; d++) begin
          yy[d] = 0.0;
          for (int b = 0; b < 8; b++) yy[d] += w_r[d][b] * (e[b] - mu_r[b]);
        end
        ie.push_back(e);
        iy.push_back(yy);
      end
      @(negedge clk);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      repeat (14) @(negedge clk);
    end
    repeat (60) @(negedge clk);

    checks++;
    if (me.size() != FRAMES || my.size() != FRAMES) begin
      failures++; $display("FAIL %0d energy vectors, %0d projections", me.size(), my.size());
    end else begin
      $display("band energy relative STD error:");
      for (int b = 7; b >= 0; b--) begin
        real mv [], iv [], r;
        mv = new[FRAMES]; iv = new[FRAMES];
        for (int f = 0; f < FRAMES; f++) begin mv[f] = me[f][b]; iv[f] = ie[f][b]; end
        r = rel_err(mv, iv);
        $display("  band %0d: %0.5f", b, r);
        checks++;
        if (!(r < 0.04)) begin failures++; $display("FAIL band %0d energy error %f", b, r); end
      end
      $display("projection relative STD error:");
      for (int d = 0; d < 3; d++) begin
        real mv [], iv [], r;
        mv = new[FRAMES]; iv = new[FRAMES];
        for (int f = 0; f < FRAMES; f++) begin mv[f] = my[f][d]; iv[f] = iy[f][d]; end
        r = rel_err(mv, iv);
        $display("  dimension %0d: %0.5f", d, r);
        checks++;
        if (!(r < 0.04)) begin failures++; $display("FAIL dimension %0d error %f", d, r); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fb_impulse -- accuracy of the fixed-point filter bank against a
// floating-point model of the same cascade, for an impulsive input.
//
// An impulse (amplitude 4) followed by silence, then a burst of random
// impulses, is streamed through the bank at 16 clocks per sample with the
// half-band Butterworth QMF pair. A double-precision model of the dyadic
// cascade, using the exact (unquantised) coefficients, produces the ideal
// band samples. For every band the testbench reports the standard
// deviation of the error divided by the standard deviation of the ideal
// band signal, and requires it to stay below 4 %, the worst per-band
// error accepted for the Q5.19 word format, and checks that one energy
// vector came out per frame.
module tb_fb_impulse;
  import sirpa_pkg::*;
  import sirpa_ref_pkg::*;

  localparam int FRAMES = 12;

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
  logic out_valid;

  filter_bank dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (FRAMES * 128 * 16 + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ floating-point cascade
  real lp_r [8], hp_r [8];
  real st_l [7][3], st_h [7][3];
  bit  ph [7];
  real ideal [8][$];

  function automatic real fstep(real x, real c [8], ref real s [3]);
    real y1, y;
    y1 = c[0] * x + s[0];
    s[0] = c[1] * x - c[2] * y1;
    y  = c[3] * y1 + s[1];
    s[1] = c[4] * y1 - c[6] * y + s[2];
    s[2] = c[5] * y1 - c[7] * y;
    return y;
  endfunction

  function automatic void fdyad(int k, real x);
    real yl, yh;
    real s [3];
    s = st_l[k]; yl = fstep(x, lp_r, s); st_l[k] = s;
    s = st_h[k]; yh = fstep(x, hp_r, s); st_h[k] = s;
    if (ph[k]) begin
      if (k == 6) ideal[0].push_back(yl);
      ideal[7 - k].push_back(yh);
      if (k < 6) fdyad(k + 1, yl);
    end
    ph[k] = !ph[k];
  endfunction

  // measured band samples
  real meas [8][$];
  int  n_frames = 0;
  always @(posedge clk) if (rst_n) begin
    if (band_valid) meas[band_idx].push_back(real'(band_x) / 524288.0);
    if (out_valid) n_frames++;
  end

  function automatic iir_coef_t to_coef(coef8_t c);
    return '{b01: q_t'(c[0]), b11: q_t'(c[1]), a11: q_t'(c[2]), b02: q_t'(c[3]),
             b12: q_t'(c[4]), b22: q_t'(c[5]), a12: q_t'(c[6]), a22: q_t'(c[7])};
  endfunction

  initial begin
    lp_r = '{1.0/6.0, 1.0/6.0, 0.0, 1.0, 2.0, 1.0, 0.0, 1.0/3.0};
    hp_r = '{1.0/6.0, -1.0/6.0, 0.0, 1.0, -2.0, 1.0, 0.0, 1.0/3.0};
    for (int k = 0; k < 7; k++) begin ph[k] = 0; for (int j = 0; j < 3; j++) begin st_l[k][j] = 0.0; st_h[k][j] = 0.0; end end
    coef_lp = to_coef(lp_coefs());
    coef_hp = to_coef(hp_coefs());
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < FRAMES * 128; s++) begin
      real xr;
      if (s == 0) xr = 4.0;
      else if (s >= 6 * 128 && $urandom_range(40) == 0) xr = real'($urandom_range(200)) / 100.0 - 1.0;
      else xr = 0.0;
      fdyad(0, xr);
      @(negedge clk);
      in_valid = 1; in_x = q_t'(q(xr));
      @(negedge clk);
      in_valid = 0;
      repeat (14) @(negedge clk);
    end
    repeat (4) @(negedge clk);

    checks++;
    if (n_frames != FRAMES) begin failures++; $display("FAIL %0d frames", n_frames); end
    $display("band  samples  rel. STD error");
    for (int b = 7; b >= 0; b--) begin
      real se, sr, me, mr, rel;
      int n;
      n = ideal[b].size();
      checks++;
      if (meas[b].size() != n) begin
        failures++; $display("FAIL band %0d: %0d samples, expected %0d", b, meas[b].size(), n);
        continue;
      end
      me = 0.0; mr = 0.0;
      for (int i = 0; i < n; i++) begin me += meas[b][i] - ideal[b][i]; mr += ideal[b][i]; end
      me /= n; mr /= n;
      se = 0.0; sr = 0.0;
      for (int i = 0; i < n; i++) begin
        se += (meas[b][i] - ideal[b][i] - me) ** 2;
        sr += (ideal[b][i] - mr) ** 2;
      end
      rel = $sqrt(se / sr);
      $display("%4d  %7d  %0.5f", b, n, rel);
      checks++;
      if (!(rel < 0.04)) begin failures++; $display("FAIL band %0d error %f above 4%%", b, rel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_filter_bank -- runs the 8-band dyadic filter bank at its worst-case
// input rate (one sample every 16 clocks) and compares every decimated band
// sample, in order, and every frame's band energies with the recursive
// reference cascade of sirpa_ref_pkg. Two coefficient sets are used (the
// half-band Butterworth pair, and a set with non-zero a11/a12 so every
// multiplier matters). Also checks: one energy vector per 128 samples,
// the longest busy time (the frame's last sample, all 7 dyads: 15 clocks),
// no overrun at 16 clocks per sample, and that a sample offered while busy
// raises overrun and is dropped.
module tb_filter_bank;
  import sirpa_pkg::*;
  import sirpa_ref_pkg::*;

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

  int     exp_band [$];
  longint exp_x    [$];
  longint exp_e    [$][];
  int     n_bands_seen = 0, n_frames = 0, n_overrun = 0;
  int     busy = 0, max_busy = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic iir_coef_t to_coef(coef8_t c);
    return '{b01: q_t'(c[0]), b11: q_t'(c[1]), a11: q_t'(c[2]), b02: q_t'(c[3]),
             b12: q_t'(c[4]), b22: q_t'(c[5]), a12: q_t'(c[6]), a22: q_t'(c[7])};
  endfunction

  // monitor: band samples and energies
  always @(posedge clk) if (rst_n) begin
    if (overrun) n_overrun++;
    if (band_valid) begin
      checks++;
      n_bands_seen++;
      if (exp_band.size() == 0) begin
        failures++; $display("FAIL unexpected band sample");
      end else begin
        int b; longint xe;
        b = exp_band.pop_front(); xe = exp_x.pop_front();
        if (int'(band_idx) != b || longint'(band_x) != xe) begin
          failures++;
          if (failures < 10) $display("FAIL band sample %0d:%0d expected %0d:%0d", band_idx, band_x, b, xe);
        end
      end
    end
    if (out_valid) begin
      n_frames++;
      checks++;
      if (exp_e.size() == 0) begin
        failures++; $display("FAIL unexpected energy vector");
      end else begin
        longint e [];
        e = exp_e.pop_front();
        for (int b = 0; b < 8; b++)
          if (longint'(energy[b]) != e[b]) begin
            failures++; $display("FAIL energy band %0d: %0d expected %0d", b, energy[b], e[b]);
          end
      end
    end
    busy = in_ready ? 0 : busy + 1;
    if (busy > max_busy) max_busy = busy;
  end

  task automatic run(coef8_t lp, coef8_t hp, int frames);
    fb_model m;
    real ph1, ph2;
    m = new(7, lp, hp);
    coef_lp = to_coef(lp);
    coef_hp = to_coef(hp);
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ph1 = 0.0; ph2 = 0.0;
    for (int s = 0; s < frames * 128; s++) begin
      longint xv;
      longint e [];
      ph1 += 0.05; ph2 += 1.3;
      xv = q(0.4 * $sin(ph1) + 0.3 * $sin(ph2)) + (longint'($signed($urandom)) >>> 13);
      @(negedge clk);
      checks++;
      if (!in_ready) begin failures++; $display("FAIL not ready at sample %0d", s); end
      in_valid = 1; in_x = q_t'(xv);
      if (m.push(xv, e)) exp_e.push_back(e);
      foreach (m.out_band[i]) begin exp_band.push_back(m.out_band[i]); exp_x.push_back(m.out_x[i]); end
      @(negedge clk);
      in_valid = 0;
      repeat (14) @(negedge clk);
    end
    repeat (4) @(negedge clk);
  endtask

  initial begin
    coef8_t lp2, hp2;
    lp2 = '{q(0.35), q(0.35), -q(0.3), q(1.0), q(1.6), q(0.9), q(0.1), q(0.2)};
    hp2 = '{q(0.35), -q(0.35), q(0.3), q(1.0), -q(1.6), q(0.9), -q(0.1), q(0.2)};
    run(lp_coefs(), hp_coefs(), 4);
    run(lp2, hp2, 3);
    checks++;
    if (n_frames != 7) begin failures++; $display("FAIL %0d frames, expected 7", n_frames); end
    checks++;
    if (n_bands_seen != 7 * 128) begin failures++; $display("FAIL %0d band samples", n_bands_seen); end
    checks++;
    if (exp_band.size() != 0 || exp_e.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    checks++;
    if (max_busy != 15) begin failures++; $display("FAIL longest busy time %0d, expected 15", max_busy); end
    checks++;
    if (n_overrun != 0) begin failures++; $display("FAIL overrun at 16 clocks per sample"); end
    // offer a second sample while the first is being filtered
    @(negedge clk);
    in_valid = 1; in_x = '0;
    @(negedge clk);
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (n_overrun != 1) begin failures++; $display("FAIL overrun count %0d, expected 1", n_overrun); end
    $display("frames=%0d band samples=%0d max busy=%0d", n_frames, n_bands_seen, max_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_iir_qmf -- checks one step of the shared QMF IIR datapath against the
// reference model: random coefficients, states and inputs (small values,
// and full-range values that drive the saturation logic), plus the
// half-band Butterworth pair run as a filter over an impulse.
module tb_iir_qmf;
  import sirpa_pkg::*;
  import sirpa_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_sat = 0;

  q_t         x, y;
  iir_coef_t  coef;
  iir_state_t st, st_nxt;

  iir_qmf dut (.x(x), .coef(coef), .st(st), .y(y), .st_nxt(st_nxt));

  function automatic longint rnd(input int bits);
    // signed random value of the given magnitude width
    return longint'($signed($urandom)) >>> (32 - bits);
  endfunction

  task automatic check_one(input coef8_t c, input longint s [3], input longint xv);
    longint sr [3];
    longint yr;
    coef = '{b01: q_t'(c[0]), b11: q_t'(c[1]), a11: q_t'(c[2]), b02: q_t'(c[3]),
             b12: q_t'(c[4]), b22: q_t'(c[5]), a12: q_t'(c[6]), a22: q_t'(c[7])};
    st = '{s0: q_t'(s[0]), s1: q_t'(s[1]), s2: q_t'(s[2])};
    x  = q_t'(xv);
    sr = s;
    yr = iir_step(xv, c, sr);
    #1;
    checks++;
    if (longint'(y) != yr || longint'(st_nxt.s0) != sr[0] ||
        longint'(st_nxt.s1) != sr[1] || longint'(st_nxt.s2) != sr[2]) begin
      failures++;
      if (failures < 10)
        $display("FAIL x=%0d y=%0d exp=%0d st=%0d,%0d,%0d exp=%0d,%0d,%0d", xv, y, yr,
                 st_nxt.s0, st_nxt.s1, st_nxt.s2, sr[0], sr[1], sr[2]);
    end
    if (yr == QMAX || yr == QMIN) n_sat++;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coef8_t c;
    longint s [3];
    longint xv;
    // random small-range vectors (|coef| < 2, |state|,|x| < 4)
    for (int t = 0; t < 3000; t++) begin
      for (int j = 0; j < 8; j++) c[j] = rnd(21);
      for (int j = 0; j < 3; j++) s[j] = rnd(22);
      check_one(c, s, rnd(22));
    end
    // full-range vectors: exercise saturation
    for (int t = 0; t < 3000; t++) begin
      for (int j = 0; j < 8; j++) c[j] = rnd(24);
      for (int j = 0; j < 3; j++) s[j] = rnd(24);
      check_one(c, s, rnd(24));
    end
    // impulse through the LP Butterworth half-band filter, state fed back;
    // also checks the DC gain of the pair is one (step response settles)
    c = lp_coefs();
    s = '{0, 0, 0};
    for (int t = 0; t < 200; t++) begin
      xv = q(1.0);
      check_one(c, s, xv);
      s[0] = longint'(st_nxt.s0); s[1] = longint'(st_nxt.s1); s[2] = longint'(st_nxt.s2);
    end
    checks++;
    if (y < q(0.99) || y > q(1.01)) begin
      failures++;
      $display("FAIL LP step response settles at %0d", y);
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL saturation never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

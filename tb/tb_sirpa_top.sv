// tb_sirpa_top -- end-to-end test of the identification stage at its
// default sizes. The coefficient file is programmed over SPI (half-band
// Butterworth QMF pair, random mean, projection matrix and centroids) and
// a few words are read back. Then audio frames of different character
// (low tone, high tone, impulsive burst, noise) are streamed at the
// fastest rate the bank allows, one sample per 16 clocks. Every band
// energy vector, projected 3D vector and symbol is compared with the
// reference model. The timing of each stage is checked: the projection
// 34 clocks after the energies, the symbol one clock later, one symbol per
// 128 samples.
//
// The three HMMs are programmed with random stochastic models; every
// window of OBS_LEN symbols must produce the class and scores of the
// fixed-point forward-algorithm reference run on the reference symbols.
//
// Mechanisms that must occur at least once: SPI write, SPI read-back of the
// coefficient file and of an HMM memory, frame close with all seven dyads
// active, projection, symbol output, more than one distinct symbol, a
// rejected (overrun) sample, and a classification.
module tb_sirpa_top;
  import sirpa_pkg::*;
  import sirpa_ref_pkg::*;

  localparam int FRAMES = 2 * OBS_LEN;   // two classification windows

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic sample_valid = 0;
  q_t   sample = '0;
  logic sample_ready, overrun;
  logic spi_sclk = 0, spi_cs_n = 1, spi_mosi = 0, spi_miso;
  logic band_valid;
  logic [2:0] band_idx;
  q_t band_x;
  logic energy_valid;
  q_t energy [8];
  logic proj_valid;
  q_t proj [3];
  logic symbol_valid;
  logic [3:0] symbol;
  logic class_valid;
  logic [1:0] class_id;
  logp_t class_scores [3];

  sirpa_top dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int n_spi_wr = 0, n_spi_rd = 0, n_frames = 0, n_full_sched = 0;
  int n_proj = 0, n_sym = 0, n_overrun = 0, n_class = 0, n_hmm_rd = 0;
  bit sym_seen [16];

  longint regs [int];
  int     all_syms [$];
  longint hpi [3][], ha [3][][], hb [3][][];
  longint exp_e [$][];
  longint exp_y [$][];
  int     exp_s [$];
  longint t_energy = 0, t_proj = 0;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- SPI
  task automatic spi_frame(input logic [39:0] f, output logic [23:0] rd);
    spi_cs_n = 0;
    repeat (5) @(negedge clk);
    for (int i = 39; i >= 0; i--) begin
      spi_mosi = f[i];
      repeat (5) @(negedge clk);
      spi_sclk = 1;
      if (i < 24) rd[i] = spi_miso;
      repeat (5) @(negedge clk);
      spi_sclk = 0;
    end
    repeat (5) @(negedge clk);
    spi_cs_n = 1;
    repeat (8) @(negedge clk);
  endtask

  task automatic spi_write(int a, longint v);
    logic [23:0] d;
    spi_frame({1'b0, 15'(a), 24'(v)}, d);
    regs[a] = v;
    n_spi_wr++;
  endtask

  task automatic spi_read_check(int a);
    logic [23:0] d;
    spi_frame({1'b1, 15'(a), 24'h0}, d);
    n_spi_rd++;
    checks++;
    if (d != 24'(regs[a])) begin failures++; $display("FAIL read-back addr %0d: %0h expected %0h", a, d, 24'(regs[a])); end
  endtask

  // ---------------------------------------------------------- monitor
  always @(posedge clk) if (rst_n) begin
    if (overrun) n_overrun++;
    if (energy_valid) begin
      longint e [];
      n_frames++;
      t_energy = $time;
      checks++;
      e = exp_e.pop_front();
      for (int b = 0; b < 8; b++)
        if (longint'(energy[b]) != e[b]) begin
          failures++; $display("FAIL energy band %0d: %0d expected %0d", b, energy[b], e[b]);
        end
    end
    if (proj_valid) begin
      longint y [];
      n_proj++;
      checks++;
      if (($time - t_energy) != 34 * 10) begin failures++; $display("FAIL projection latency %0t", $time - t_energy); end
      y = exp_y.pop_front();
      t_proj = $time;
      for (int d = 0; d < 3; d++) begin
        checks++;
        if (longint'(proj[d]) != y[d]) begin failures++; $display("FAIL proj[%0d] %0d expected %0d", d, proj[d], y[d]); end
      end
    end
    if (class_valid) begin
      int obs [];
      longint sc [3];
      int best;
      n_class++;
      obs = new[OBS_LEN];
      for (int t = 0; t < OBS_LEN; t++) obs[t] = all_syms.pop_front();
      best = 0;
      for (int m = 0; m < 3; m++) begin
        sc[m] = hmm_fixed(hpi[m], ha[m], hb[m], obs);
        if (sc[m] > sc[best]) best = m;
        checks++;
        if (longint'(class_scores[m]) != sc[m]) begin
          failures++; $display("FAIL window score model %0d: %0d expected %0d", m, class_scores[m], sc[m]);
        end
      end
      checks++;
      if (int'(class_id) != best) begin failures++; $display("FAIL class %0d expected %0d", class_id, best); end
      $display("window %0d: class %0d, log2 scores %0d %0d %0d (/256)", n_class, class_id,
               class_scores[0], class_scores[1], class_scores[2]);
    end
    if (symbol_valid) begin
      int s;
      n_sym++;
      s = exp_s.pop_front();
      all_syms.push_back(s);
      sym_seen[symbol] = 1;
      checks++;
      if (($time - t_proj) != 10) begin failures++; $display("FAIL symbol latency"); end
      if (int'(symbol) != s) begin failures++; $display("FAIL symbol %0d expected %0d", symbol, s); end
    end
  end

  function automatic longint rnd(input int bits);
    return longint'($signed($urandom)) >>> (32 - bits);
  endfunction

  // random probability vector, quantised to Q5.19
  function automatic void prob_row(int n, ref longint r []);
    int w [];
    int tot;
    r = new[n]; w = new[n];
    tot = 0;
    for (int k = 0; k < n; k++) begin w[k] = 50 + $urandom_range(1000); tot += w[k]; end
    for (int k = 0; k < n; k++) r[k] = (longint'(w[k]) <<< 19) / tot;
  endfunction

  initial begin
    fb_model m;
    coef8_t lp, hp;
    longint mu [], wr [][], cent [][];
    int rd_ok;
    lp = lp_coefs(); hp = hp_coefs();
    mu = new[8]; wr = new[3]; cent = new[16];
    repeat (3) @(negedge clk);
    rst_n = 1;
    // program the stage
    for (int i = 0; i < 8; i++) begin
      spi_write(A_LP + i, lp[i]);
      spi_write(A_HP + i, hp[i]);
      mu[i] = q(0.02) + rnd(13);
      spi_write(A_MU + i, mu[i]);
    end
    for (int d = 0; d < 3; d++) begin
      wr[d] = new[8];
      for (int i = 0; i < 8; i++) begin wr[d][i] = rnd(22); spi_write(A_W + 8*d + i, wr[d][i]); end
    end
    for (int k = 0; k < 16; k++) begin
      cent[k] = new[3];
      for (int d = 0; d < 3; d++) begin cent[k][d] = rnd(17); spi_write(A_CENT + 3*k + d, cent[k][d]); end
    end
    // the three HMMs
    for (int m = 0; m < 3; m++) begin
      int base;
      base = A_HMM + HMM_STRIDE * m;
      prob_row(N_HMM_ST, hpi[m]);
      ha[m] = new[N_HMM_ST]; hb[m] = new[N_HMM_ST];
      for (int i = 0; i < N_HMM_ST; i++) begin prob_row(N_HMM_ST, ha[m][i]); prob_row(N_CENT, hb[m][i]); end
      for (int j = 0; j < N_HMM_ST; j++) spi_write(base + j, hpi[m][j]);
      for (int i = 0; i < N_HMM_ST; i++) for (int j = 0; j < N_HMM_ST; j++)
        spi_write(base + N_HMM_ST + N_HMM_ST*i + j, ha[m][i][j]);
      for (int j = 0; j < N_HMM_ST; j++) for (int o = 0; o < N_CENT; o++)
        spi_write(base + N_HMM_ST + N_HMM_ST*N_HMM_ST + N_CENT*j + o, hb[m][j][o]);
    end
    spi_read_check(A_LP + 7);
    spi_read_check(A_W + 13);
    spi_read_check(A_CENT + 47);
    spi_read_check(A_HMM + HMM_STRIDE + 30);  n_hmm_rd++;
    spi_read_check(A_HMM + 2*HMM_STRIDE + 83); n_hmm_rd++;

    // stream audio
    m = new(7, lp, hp);
    for (int f = 0; f < FRAMES; f++) begin
      int kind;
      real ph;
      kind = f % 4;
      ph = 0.0;
      for (int s = 0; s < 128; s++) begin
        longint xv;
        longint e [];
        case (kind)
          0: xv = q(0.6 * $sin(ph));                      // low tone
          1: xv = q(0.5 * $sin(3.0 * ph));                 // high tone
          2: xv = (s < 8) ? q(3.0) - 64'(s) * q(0.4) : rnd(14);  // impulsive burst
          default: xv = rnd(20);                            // noise
        endcase
        ph += 0.02 + 0.9 * real'(f % 3) ;
        @(negedge clk);
        checks++;
        if (!sample_ready) begin failures++; $display("FAIL not ready"); end
        sample_valid = 1; sample = q_t'(xv);
        if (m.push(xv, e)) begin
          longint y [];
          exp_e.push_back(e);
          y = new[3];
          for (int d = 0; d < 3; d++) y[d] = sirpa_ref_pkg::proj(e, mu, wr[d]);
          exp_y.push_back(y);
          exp_s.push_back(nearest(y, cent));
          n_full_sched++;
        end
        @(negedge clk);
        // on one sample hold the request a cycle too long: overrun
        if (!(f == 1 && s == 5)) sample_valid = 0;
        @(negedge clk);
        sample_valid = 0;
        repeat (13) @(negedge clk);
      end
    end
    repeat (200) @(negedge clk);

    checks++;
    if (n_frames != FRAMES || n_proj != FRAMES || n_sym != FRAMES) begin
      failures++; $display("FAIL frames %0d proj %0d sym %0d", n_frames, n_proj, n_sym);
    end
    begin
      int distinct;
      distinct = 0;
      foreach (sym_seen[k]) distinct += sym_seen[k];
      $display("mechanisms: spi_write=%0d spi_read=%0d hmm_read=%0d frames=%0d full_schedule=%0d proj=%0d symbols=%0d distinct_symbols=%0d overrun=%0d classifications=%0d",
               n_spi_wr, n_spi_rd, n_hmm_rd, n_frames, n_full_sched, n_proj, n_sym, distinct, n_overrun, n_class);
      checks++; if (n_class != FRAMES / OBS_LEN) begin failures++; $display("FAIL %0d classifications", n_class); end
      checks++; if (n_hmm_rd == 0) begin failures++; $display("FAIL no HMM read-back"); end
      checks++; if (n_spi_wr == 0)     begin failures++; $display("FAIL no SPI write"); end
      checks++; if (n_spi_rd == 0)     begin failures++; $display("FAIL no SPI read"); end
      checks++; if (n_full_sched == 0) begin failures++; $display("FAIL no full schedule"); end
      checks++; if (n_proj == 0)       begin failures++; $display("FAIL no projection"); end
      checks++; if (distinct < 2)      begin failures++; $display("FAIL fewer than two distinct symbols"); end
      checks++; if (n_overrun != 1)    begin failures++; $display("FAIL overrun count %0d", n_overrun); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

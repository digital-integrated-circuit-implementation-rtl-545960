// tb_hmm_classifier -- three random stochastic 4-state, 16-symbol models
// are written into the classifier; windows of 32 symbols (random, or
// drawn from one of the models) are streamed. Each window's three scores
// must equal the fixed-point reference bit for bit and lie within 0.15 of
// the floating-point forward algorithm, the class must be the best score,
// and the result must follow the window's last symbol by NS*(NS+1)+4
// clocks. One model is given a zero emission column so that some windows
// are impossible under it (score LOGP_MIN). The parameter memories are
// also read back.
module tb_hmm_classifier;
  import sirpa_pkg::*;
  import sirpa_ref_pkg::*;

  localparam int NM = 3, NS = 4, NSYM = 16, WIN = 32;
  localparam int WINDOWS = 30;

  int checks = 0, failures = 0;
  int n_dead = 0, n_class [3] = '{0, 0, 0};

  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [8:0] wr_addr = '0, rd_addr = '0;
  q_t wr_data = '0, rd_data;
  logic sym_valid = 0, sym_ready;
  logic [3:0] sym = '0;
  logic class_valid;
  logic [1:0] class_id;
  logp_t scores [3];

  hmm_classifier dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint pi_q [3][], a_q [3][][], b_q [3][][];
  real    pi_r [3][], a_r [3][][], b_r [3][][];
  q_t     shadow [3][128];

  // random probability vector of n entries, quantised to Q5.19 (floor);
  // the real version holds the quantised values so both models agree
  task automatic rand_row(int n, output longint rq [], output real rr []);
    real w [], tot;
    rq = new[n]; rr = new[n]; w = new[n];
    tot = 0.0;
    for (int k = 0; k < n; k++) begin w[k] = 0.05 + real'($urandom_range(1000)) / 1000.0; tot += w[k]; end
    for (int k = 0; k < n; k++) begin
      rq[k] = longint'($floor(w[k] / tot * 524288.0));
      rr[k] = real'(rq[k]) / 524288.0;
    end
  endtask

  task automatic wr(int m, int a, longint v);
    @(negedge clk);
    wr_en = 1; wr_addr = 9'(m * 128 + a); wr_data = q_t'(v);
    shadow[m][a] = q_t'(v);
    @(negedge clk);
    wr_en = 0;
  endtask

  // draw a symbol sequence from model m
  function automatic int draw(real p []);
    real u, c;
    u = real'($urandom_range(999999)) / 1000000.0;
    c = 0.0;
    foreach (p[k]) begin c += p[k]; if (u < c) return k; end
    return p.size() - 1;
  endfunction

  initial begin
    for (int m = 0; m < NM; m++) for (int a = 0; a < 128; a++) shadow[m][a] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // models
    for (int m = 0; m < NM; m++) begin
      longint rq []; real rr [];
      a_q[m] = new[NS]; a_r[m] = new[NS]; b_q[m] = new[NS]; b_r[m] = new[NS];
      rand_row(NS, rq, rr); pi_q[m] = rq; pi_r[m] = rr;
      for (int i = 0; i < NS; i++) begin
        rand_row(NS, rq, rr); a_q[m][i] = rq; a_r[m][i] = rr;
        rand_row(NSYM, rq, rr); b_q[m][i] = rq; b_r[m][i] = rr;
      end
      // model 2 can never emit symbol 15
      if (m == 2) for (int j = 0; j < NS; j++) begin b_q[m][j][15] = 0; b_r[m][j][15] = 0.0; end
      // sharpen each model's emissions towards its own symbol range
      for (int j = 0; j < NS; j++) begin
        for (int o = 0; o < NSYM; o++)
          if (o / 5 == m) begin b_q[m][j][o] += 64'sd200000; b_r[m][j][o] = real'(b_q[m][j][o]) / 524288.0; end
      end
      for (int j = 0; j < NS; j++) wr(m, j, pi_q[m][j]);
      for (int i = 0; i < NS; i++) for (int j = 0; j < NS; j++) wr(m, NS + NS*i + j, a_q[m][i][j]);
      for (int j = 0; j < NS; j++) for (int o = 0; o < NSYM; o++) wr(m, NS + NS*NS + NSYM*j + o, b_q[m][j][o]);
    end
    // read back
    for (int m = 0; m < NM; m++) for (int a = 0; a < 84; a += 7) begin
      rd_addr = 9'(m * 128 + a);
      #1;
      checks++;
      if (rd_data != shadow[m][a]) begin failures++; $display("FAIL read-back %0d/%0d", m, a); end
    end
    // windows
    for (int w = 0; w < WINDOWS; w++) begin
      int obs [];
      int src, lat;
      longint ef [3];
      real er [3];
      int best;
      obs = new[WIN];
      src = w % 4;       // 0..2: drawn from that model, 3: uniform random
      begin
        int st;
        st = (src < 3) ? draw(pi_r[src]) : 0;
        for (int t = 0; t < WIN; t++) begin
          if (src < 3) begin
            obs[t] = draw(b_r[src][st]);
            st = draw(a_r[src][st]);
          end else obs[t] = $urandom_range(NSYM - 1);
        end
      end
      best = 0;
      for (int m = 0; m < NM; m++) begin
        ef[m] = hmm_fixed(pi_q[m], a_q[m], b_q[m], obs);
        er[m] = hmm_real(pi_r[m], a_r[m], b_r[m], obs);
        if (ef[m] > ef[best]) best = m;
      end
      for (int t = 0; t < WIN; t++) begin
        @(negedge clk);
        while (!sym_ready) @(negedge clk);
        sym_valid = 1; sym = 4'(obs[t]);
        @(negedge clk);
        sym_valid = 0;
        lat = 1;
        if (t == WIN - 1) begin
          while (!class_valid && lat < 200) begin @(negedge clk); lat++; end
          checks++;
          if (lat != NS * (NS + 1) + 4) begin failures++; $display("FAIL latency %0d", lat); end
        end
      end
      checks++;
      if (int'(class_id) != best) begin failures++; $display("FAIL window %0d class %0d expected %0d", w, class_id, best); end
      n_class[class_id]++;
      for (int m = 0; m < NM; m++) begin
        checks++;
        if (longint'(scores[m]) != ef[m]) begin
          failures++; $display("FAIL window %0d model %0d score %0d expected %0d", w, m, scores[m], ef[m]);
        end
        if (ef[m] == -(64'sd1 <<< 23)) n_dead++;
        else begin
          real dlt;
          checks++;
          dlt = real'(scores[m]) / 256.0 - er[m];
          if (dlt > 0.15 || dlt < -0.15) begin
            failures++; $display("FAIL window %0d model %0d log2P %f, float %f", w, m, real'(scores[m]) / 256.0, er[m]);
          end
        end
      end
    end
    $display("classes: %0d %0d %0d, impossible scores %0d", n_class[0], n_class[1], n_class[2], n_dead);
    checks++;
    if (n_dead == 0) begin failures++; $display("FAIL no impossible window"); end
    checks++;
    if (n_class[0] == 0 || n_class[1] == 0 || n_class[2] == 0) begin failures++; $display("FAIL a class never chosen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_coef_regs -- writes random words to random addresses of the
// coefficient file (including addresses beyond its 96 words), then checks
// every word through the read port and through the parallel outputs
// (LP and HP coefficient sets, mean vector, projection matrix, centroids)
// against a shadow copy kept by the testbench, and checks reset clearing.
module tb_coef_regs;
  import sirpa_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [6:0] wr_addr = '0, rd_addr = '0;
  q_t wr_data = '0, rd_data;
  iir_coef_t coef_lp, coef_hp;
  q_t mu [8];
  q_t w [3][8];
  q_t cent [16][3];

  coef_regs dut (.*);

  always #5 clk = ~clk;

  q_t shadow [128];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_word(int a, q_t got, string what);
    checks++;
    if (got !== shadow[a]) begin
      failures++;
      if (failures < 10) $display("FAIL %s (addr %0d): %0h expected %0h", what, a, got, shadow[a]);
    end
  endtask

  task automatic check_all();
    q_t lp [8], hp [8];
    for (int a = 0; a < 128; a++) begin
      rd_addr = 7'(a);
      #1;
      check_word(a, rd_data, "read port");
    end
    lp = '{coef_lp.b01, coef_lp.b11, coef_lp.a11, coef_lp.b02, coef_lp.b12, coef_lp.b22, coef_lp.a12, coef_lp.a22};
    hp = '{coef_hp.b01, coef_hp.b11, coef_hp.a11, coef_hp.b02, coef_hp.b12, coef_hp.b22, coef_hp.a12, coef_hp.a22};
    for (int i = 0; i < 8; i++) begin
      check_word(0 + i, lp[i], "coef_lp");
      check_word(8 + i, hp[i], "coef_hp");
      check_word(16 + i, mu[i], "mu");
      for (int d = 0; d < 3; d++) check_word(24 + 8*d + i, w[d][i], "w");
    end
    for (int k = 0; k < 16; k++)
      for (int d = 0; d < 3; d++) check_word(48 + 3*k + d, cent[k][d], "cent");
  endtask

  initial begin
    for (int a = 0; a < 128; a++) shadow[a] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_all();
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 7'($urandom); wr_data = q_t'($urandom);
      if (wr_addr < 96) shadow[wr_addr] = wr_data;
      @(negedge clk);
      wr_en = 0;
    end
    check_all();
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 128; a++) shadow[a] = '0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

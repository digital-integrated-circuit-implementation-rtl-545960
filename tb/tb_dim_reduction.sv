// tb_dim_reduction -- random input vectors, means and projection matrices
// (moderate values and full-range values that saturate) through the
// sequential 8D -> 3D projection; each result is compared with
// W (x - mu) computed independently, and the latency from in_valid to
// out_valid must be exactly 34 clocks. A vector offered while busy must be
// ignored.
module tb_dim_reduction;
  import sirpa_pkg::*;
  import sirpa_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_sat = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid;
  q_t x [8], mu [8], w [3][8], y [3];

  dim_reduction dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd(input int bits);
    return longint'($signed($urandom)) >>> (32 - bits);
  endfunction

  initial begin
    for (int i = 0; i < 8; i++) begin x[i] = '0; mu[i] = '0; for (int d = 0; d < 3; d++) w[d][i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      longint xr [], mr [], wr [], ye [3];
      int lat;
      int bits;
      bits = (t % 10 == 9) ? 24 : 21;
      xr = new[8]; mr = new[8]; wr = new[8];
      for (int i = 0; i < 8; i++) begin
        xr[i] = rnd(bits); mr[i] = rnd(bits);
        x[i] = q_t'(xr[i]); mu[i] = q_t'(mr[i]);
      end
      for (int d = 0; d < 3; d++) begin
        for (int i = 0; i < 8; i++) begin wr[i] = rnd(bits); w[d][i] = q_t'(wr[i]); end
        ye[d] = proj(xr, mr, wr);
        if (ye[d] == QMAX || ye[d] == QMIN) n_sat++;
      end
      @(negedge clk);
      checks++;
      if (!in_ready) begin failures++; $display("FAIL not ready"); end
      in_valid = 1;
      @(negedge clk);
      lat = 1;
      // a second vector while busy must be ignored
      x[0] = q_t'(rnd(22));
      while (!out_valid && lat < 100) begin @(negedge clk); lat++; end
      in_valid = 0;
      checks++;
      if (lat != 34) begin failures++; $display("FAIL latency %0d, expected 34", lat); end
      for (int d = 0; d < 3; d++) begin
        checks++;
        if (longint'(y[d]) != ye[d]) begin
          failures++;
          if (failures < 10) $display("FAIL y[%0d]=%0d expected %0d", d, y[d], ye[d]);
        end
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL out_valid longer than one cycle"); end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL no saturated output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

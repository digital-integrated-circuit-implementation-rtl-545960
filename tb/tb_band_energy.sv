// tb_band_energy -- feeds each band the number of samples it gets in one
// frame of the 8-band bank (1,1,2,4,...,64), in random order with idle
// cycles, then closes the frame and compares the eight mean squares with
// an independent computation. Covers several frames, the clearing of the
// accumulators between frames, the one-cycle valid timing and saturation.
module tb_band_energy;
  import sirpa_pkg::*;

  localparam int NB = 8;
  int checks = 0, failures = 0;
  int n_sat = 0;

  logic clk = 0, rst_n = 0;
  logic acc_en = 0, frame_end = 0;
  logic [2:0] acc_band = '0;
  q_t acc_x = '0;
  q_t energy [NB];
  logic out_valid;

  band_energy dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int count_of(int b);
    return (b == 0) ? 1 : (1 << (b - 1));
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 12; fr++) begin
      longint sum [NB];
      int     left [NB];
      int     total;
      total = 0;
      for (int b = 0; b < NB; b++) begin
        sum[b] = 0; left[b] = count_of(b); total += left[b];
      end
      while (total > 0) begin
        int b;
        longint v;
        b = $urandom_range(NB - 1);
        if (left[b] == 0) continue;
        // frame 5 drives full-scale values to reach saturation
        v = (fr == 5) ? longint'(signed'(Q_MIN)) + longint'($urandom_range(3))
                      : longint'($signed($urandom)) >>> (8 + $urandom_range(8));
        @(negedge clk);
        acc_en = 1; acc_band = 3'(b); acc_x = q_t'(v);
        sum[b] += v * v;
        left[b]--; total--;
        @(negedge clk);
        acc_en = 0;
        if ($urandom_range(3) == 0) @(negedge clk);
      end
      @(negedge clk);
      frame_end = 1;
      @(negedge clk);
      frame_end = 0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL out_valid missing frame %0d", fr); end
      for (int b = 0; b < NB; b++) begin
        longint m;
        m = (sum[b] / count_of(b)) >>> 19;
        if (m > 64'sd8388607) begin m = 64'sd8388607; n_sat++; end
        checks++;
        if (longint'(energy[b]) != m) begin
          failures++;
          $display("FAIL frame %0d band %0d: %0d expected %0d", fr, b, energy[b], m);
        end
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL out_valid longer than one cycle"); end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL no saturation case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

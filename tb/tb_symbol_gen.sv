// tb_symbol_gen -- random centroid sets and query vectors through the
// combinational nearest-centroid tree; the symbol must equal the index of
// the L1-nearest centroid found by a linear search (lowest index on a tie)
// and min_dist its distance. Includes queries placed exactly on a
// centroid, deliberate ties, and full-range values.
module tb_symbol_gen;
  import sirpa_pkg::*;
  import sirpa_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_tie = 0;

  q_t y [3];
  q_t cent [16][3];
  logic [3:0] symbol;
  logic [26:0] min_dist;

  symbol_gen dut (.*);

  function automatic longint rnd(input int bits);
    return longint'($signed($urandom)) >>> (32 - bits);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint cr [][], yr [];
    cr = new[16];
    yr = new[3];
    for (int t = 0; t < 4000; t++) begin
      int bits, exp_k;
      longint ed;
      bits = (t % 4 == 3) ? 24 : 20;
      for (int k = 0; k < 16; k++) begin
        cr[k] = new[3];
        for (int d = 0; d < 3; d++) begin cr[k][d] = rnd(bits); cent[k][d] = q_t'(cr[k][d]); end
      end
      case (t % 5)
        0: for (int d = 0; d < 3; d++) yr[d] = cr[$urandom_range(15)][d];
        1: begin  // two equal centroids: the lower index must win
             int a, b;
             a = $urandom_range(7); b = a + 1 + $urandom_range(7);
             cr[b] = cr[a];
             for (int d = 0; d < 3; d++) begin cent[b][d] = q_t'(cr[a][d]); yr[d] = cr[a][d] + 5; end
           end
        default: for (int d = 0; d < 3; d++) yr[d] = rnd(bits);
      endcase
      for (int d = 0; d < 3; d++) y[d] = q_t'(yr[d]);
      exp_k = nearest(yr, cr);
      ed = 0;
      for (int d = 0; d < 3; d++) ed += (yr[d] > cr[exp_k][d]) ? yr[d] - cr[exp_k][d] : cr[exp_k][d] - yr[d];
      #1;
      checks++;
      if (int'(symbol) != exp_k || longint'(min_dist) != ed) begin
        failures++;
        if (failures < 10) $display("FAIL symbol %0d dist %0d, expected %0d dist %0d", symbol, min_dist, exp_k, ed);
      end
      if (t % 5 == 1) n_tie++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_spi_slave -- an SPI master model (mode 0, MSB first, 40-bit frames,
// SCLK = clk/10)
// sends random write frames, whose single-clock write strobes must carry
// the frame's address and data, and read frames, whose MISO bits must
// return the word a test memory holds at the requested address. A frame
// cut short by CS_N must not write.
module tb_spi_slave;
  import sirpa_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic sclk = 0, cs_n = 1, mosi = 0, miso;
  logic wr_en;
  logic [14:0] wr_addr, rd_addr;
  q_t wr_data, rd_data;

  spi_slave dut (.*);

  always #5 clk = ~clk;

  q_t mem [32768];
  assign rd_data = mem[rd_addr];

  int n_wr = 0;
  logic [14:0] last_addr;
  q_t last_data;
  always @(posedge clk) if (wr_en) begin n_wr++; last_addr = wr_addr; last_data = wr_data; end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // shift nbits of a frame out; returns what MISO carried
  task automatic xfer(input logic [39:0] frame, input int nbits, output logic [39:0] rx);
    rx = '0;
    cs_n = 0;
    repeat (5) @(negedge clk);
    for (int i = 39; i > 39 - nbits; i--) begin
      mosi = frame[i];
      repeat (5) @(negedge clk);
      sclk = 1;
      rx[i] = miso;
      repeat (5) @(negedge clk);
      sclk = 0;
    end
    repeat (5) @(negedge clk);
    cs_n = 1;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    logic [39:0] r;
    for (int a = 0; a < 32768; a++) mem[a] = q_t'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      logic [14:0] a;
      logic [23:0] d;
      int n_before;
      a = 15'($urandom); d = 24'($urandom);
      n_before = n_wr;
      case (t % 3)
        0: begin
          xfer({1'b0, a, d}, 40, r);
          checks++;
          if (n_wr != n_before + 1 || last_addr != a || last_data != d) begin
            failures++; $display("FAIL write %0h:%0h got %0d writes %0h:%0h", a, d, n_wr - n_before, last_addr, last_data);
          end
        end
        1: begin
          xfer({1'b1, a, d}, 40, r);
          checks++;
          if (n_wr != n_before || r[23:0] != mem[a] || r[39:24] != 16'h0000) begin
            failures++; $display("FAIL read %0h got %0h expected %0h", a, r[23:0], mem[a]);
          end
        end
        default: begin
          xfer({1'b0, a, d}, 8 + $urandom_range(28), r);
          checks++;
          if (n_wr != n_before) begin failures++; $display("FAIL aborted frame wrote"); end
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// spi_slave -- SPI target through which the coefficients of the
// identification stage are written and read back.
//
// The published design programs the filter coefficients, the projection
// mean and matrix and the centroids over SPI but gives no frame format;
// the format here is this design's own. SPI mode 0 (SCLK idle low, data
// sampled on the rising edge, changed on the falling edge), MSB first,
// 40-bit frames (five bytes) framed by CS_N low:
//
//   bit 39      rw    1 = read, 0 = write
//   bits 38:24  addr  word address (register map in sirpa_pkg)
//   bits 23:0   data  write data, or read data returned on MISO
//
// A write is issued (wr_en for one clk) after the 40th bit. For a read the
// address is presented on rd_addr once the first 16 bits are in, and the
// word on rd_data is shifted out during bits 23..0. A frame cut short by
// CS_N rising is dropped.
//
// SCLK, CS_N and MOSI are sampled in the system clock domain through
// two-flop synchronisers, so SCLK must stay high and low for at least
// 4 system clocks each (SCLK at most clk/8).
module spi_slave
  import sirpa_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sclk,
  input  logic              cs_n,
  input  logic              mosi,
  output logic              miso,
  output logic              wr_en,
  output logic [SPI_AW-1:0] wr_addr,
  output q_t                wr_data,
  output logic [SPI_AW-1:0] rd_addr,
  input  q_t                rd_data
);

  logic [2:0] sclk_s;
  logic [1:0] cs_s;
  logic [1:0] mosi_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0;
      cs_s   <= '1;
      mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[0], cs_n};
      mosi_s <= {mosi_s[0], mosi};
    end
  end

  logic sclk_rise, sclk_fall, cs_act;
  assign sclk_rise = (sclk_s[2:1] == 2'b01);
  assign sclk_fall = (sclk_s[2:1] == 2'b10);
  assign cs_act    = !cs_s[1];

  logic [5:0]         cnt;       // bits received in this frame
  localparam int unsigned FRAME_W = 1 + SPI_AW + DATA_W;   // 40
  localparam int unsigned HDR_W   = 1 + SPI_AW;            // 16

  logic [FRAME_W-2:0] rx;        // last 39 bits received
  logic [DATA_W-1:0]  tx;

  assign rd_addr = rx[SPI_AW-1:0];

  logic is_read;   // this frame is a read (known after 8 bits)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      rx      <= '0;
      tx      <= '0;
      is_read <= 1'b0;
      miso    <= 1'b0;
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
    end else begin
      wr_en <= 1'b0;
      if (!cs_act) begin
        cnt     <= '0;
        is_read <= 1'b0;
        miso    <= 1'b0;
      end else begin
        if (sclk_rise) begin
          rx  <= {rx[FRAME_W-3:0], mosi_s[1]};
          cnt <= cnt + 1'b1;
          if (cnt == 6'(FRAME_W - 1)) begin
            // rx = rw, address, data bits 23..1
            wr_en   <= !rx[FRAME_W-2];
            wr_addr <= rx[FRAME_W-3 -: SPI_AW];
            wr_data <= {rx[DATA_W-2:0], mosi_s[1]};
          end
        end
        if (sclk_fall) begin
          if (cnt == 6'(HDR_W)) begin
            // header in: rx[15] = rw, rx[14:0] = address, read word on rd_data
            is_read <= rx[HDR_W-1];
            miso    <= rx[HDR_W-1] & rd_data[DATA_W-1];
            tx      <= {rd_data[DATA_W-2:0], 1'b0};
          end else if (cnt > 6'(HDR_W)) begin
            miso <= is_read & tx[DATA_W-1];
            tx   <= {tx[DATA_W-2:0], 1'b0};
          end
        end
      end
    end
  end

endmodule

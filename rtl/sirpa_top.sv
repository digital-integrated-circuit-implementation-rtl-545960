// sirpa_top -- acoustic detector for gunshots and chainsaws: the
// identification stage turns a 44.1 kHz audio sample stream into a stream
// of discrete symbols, one per 128 input samples (344.53 Hz), and the
// classification stage scores windows of symbols against one hidden
// Markov model per class.
//
// Chain, as published:
//   filter_bank     8-band dyadic QMF IIR bank, one shared filter datapath,
//                   band energies once per 128 samples
//   dim_reduction   y = W (x - mu), 8D -> 3D, sequential, 34 clocks
//   symbol_gen      index of the nearest of 16 centroids (L1 distance)
//   hmm_classifier  forward-algorithm score of each window under 3 HMMs,
//                   best model = class
//   coef_regs       filter coefficients, mean, matrix and centroids,
//                   programmable through spi_slave (as are the HMMs)
//
// The symbol register after symbol_gen (one clock), the SPI frame format,
// the address map, the number of centroids, HMM states and window length,
// and the fixed-point HMM arithmetic are this design's choices.
// Clock: at least 16 clocks per input sample (705.6 kHz for 44.1 kHz
// audio); the published design runs at about 750 kHz.
//
// Interface: sample_valid/sample deliver one Q5.19 audio sample; it is
// taken while sample_ready is high (overrun flags a lost sample). The band
// energies, the projected vector and the symbol each come with a one-clock
// valid strobe, and so does each window's class with its three scores.
// The SPI pins reach the coefficient file (word addresses 0..95) and the
// HMM memories (A_HMM + 128*model + word).
module sirpa_top
  import sirpa_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // audio input
  input  logic             sample_valid,
  input  q_t               sample,
  output logic             sample_ready,
  output logic             overrun,
  // coefficient programming
  input  logic             spi_sclk,
  input  logic             spi_cs_n,
  input  logic             spi_mosi,
  output logic             spi_miso,
  // decimated band samples (observation)
  output logic             band_valid,
  output logic [$clog2(N_BANDS)-1:0] band_idx,
  output q_t               band_x,
  // band energies, once per frame
  output logic             energy_valid,
  output q_t               energy [N_BANDS],
  // reduced 3D vector
  output logic             proj_valid,
  output q_t               proj [N_DIMS],
  // symbol
  output logic             symbol_valid,
  output logic [SYM_W-1:0] symbol,
  // classification, once per window of OBS_LEN symbols
  output logic             class_valid,
  output logic [$clog2(N_MODELS)-1:0] class_id,
  output logp_t            class_scores [N_MODELS]
);

  // ------------------------------------------------ coefficient access
  localparam int unsigned HPAW = HMM_AW + $clog2(N_MODELS);

  logic              wr_en;
  logic [SPI_AW-1:0] wr_addr, rd_addr;
  q_t                wr_data, rd_data, regs_rd, hmm_rd;
  logic              wr_regs, wr_hmm, rd_is_hmm;
  iir_coef_t         coef_lp, coef_hp;
  q_t                mu   [N_BANDS];
  q_t                w    [N_DIMS][N_BANDS];
  q_t                cent [N_CENT][N_DIMS];

  spi_slave u_spi (
    .clk     (clk),
    .rst_n   (rst_n),
    .sclk    (spi_sclk),
    .cs_n    (spi_cs_n),
    .mosi    (spi_mosi),
    .miso    (spi_miso),
    .wr_en   (wr_en),
    .wr_addr (wr_addr),
    .wr_data (wr_data),
    .rd_addr (rd_addr),
    .rd_data (rd_data)
  );

  // address decode: coefficient file below 2^ADDR_W, HMM memories from A_HMM
  function automatic logic in_hmm(input logic [SPI_AW-1:0] a);
    return 32'(a) >= A_HMM && 32'(a) < A_HMM + N_MODELS * HMM_STRIDE;
  endfunction

  always_comb begin
    wr_regs   = wr_en && (wr_addr >> ADDR_W) == '0;
    wr_hmm    = wr_en && in_hmm(wr_addr);
    rd_is_hmm = in_hmm(rd_addr);
    rd_data   = rd_is_hmm ? hmm_rd : ((rd_addr >> ADDR_W) == '0) ? regs_rd : '0;
  end

  coef_regs u_regs (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (wr_regs),
    .wr_addr (wr_addr[ADDR_W-1:0]),
    .wr_data (wr_data),
    .rd_addr (rd_addr[ADDR_W-1:0]),
    .rd_data (regs_rd),
    .coef_lp (coef_lp),
    .coef_hp (coef_hp),
    .mu      (mu),
    .w       (w),
    .cent    (cent)
  );

  // ------------------------------------------------------- filter bank
  filter_bank u_fb (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (sample_valid),
    .in_x       (sample),
    .in_ready   (sample_ready),
    .overrun    (overrun),
    .coef_lp    (coef_lp),
    .coef_hp    (coef_hp),
    .band_valid (band_valid),
    .band_idx   (band_idx),
    .band_x     (band_x),
    .energy     (energy),
    .out_valid  (energy_valid)
  );

  // ----------------------------------------------- dimensional reduction
  logic dr_ready;
  dim_reduction u_dr (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (energy_valid),
    .x         (energy),
    .in_ready  (dr_ready),
    .mu        (mu),
    .w         (w),
    .y         (proj),
    .out_valid (proj_valid)
  );

  // A frame lasts at least 128 x 16 clocks, far longer than the 34-clock
  // projection, so the reduction stage is always free for a new vector.
  assert property (@(posedge clk) disable iff (!rst_n) energy_valid |-> dr_ready)
    else $error("sirpa_top: dimensional reduction busy at frame end");

  // --------------------------------------------------- symbol generator
  logic [SYM_W-1:0]            sym_c;
  logic [DATA_W+2:0]           sym_dist;
  symbol_gen u_sym (
    .y        (proj),
    .cent     (cent),
    .symbol   (sym_c),
    .min_dist (sym_dist)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      symbol_valid <= 1'b0;
      symbol       <= '0;
    end else begin
      symbol_valid <= proj_valid;
      if (proj_valid) symbol <= sym_c;
    end
  end

  // ------------------------------------------------------ classification
  logic hmm_ready;
  hmm_classifier u_hmm (
    .clk         (clk),
    .rst_n       (rst_n),
    .wr_en       (wr_hmm),
    .wr_addr     (HPAW'(32'(wr_addr) - A_HMM)),
    .wr_data     (wr_data),
    .rd_addr     (HPAW'(32'(rd_addr) - A_HMM)),
    .rd_data     (hmm_rd),
    .sym_valid   (symbol_valid),
    .sym         (symbol),
    .sym_ready   (hmm_ready),
    .class_valid (class_valid),
    .class_id    (class_id),
    .scores      (class_scores)
  );

  assert property (@(posedge clk) disable iff (!rst_n) symbol_valid |-> hmm_ready)
    else $error("sirpa_top: classifier busy when a symbol arrived");

endmodule

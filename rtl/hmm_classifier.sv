// hmm_classifier -- final classification stage: one HMM per class, scored
// with the forward algorithm over a window of symbols; the class whose
// model gives the largest log-likelihood wins.
//
// As published, the classifier holds one hidden Markov model per class
// (three: the design targets gunshots and chainsaws, the third class here
// standing for background) and computes log P(O | lambda) of the symbol
// chain under each. Here the three hmm_forward engines run side by side on
// the same symbol stream. The stream is cut into consecutive,
// non-overlapping windows of OBS_LEN symbols (window length and windowing
// are this design's choices); at the end of each window class_valid
// pulses with the index of the best model (lowest index on a tie) and the
// three scores (log2, 8 fractional bits).
//
// Model parameters are written through a single port: address bits above
// HMM_AW select the model, the low HMM_AW bits the word in its memory.
//
// Timing: a symbol is taken when sym_ready is high; each engine needs
// NS*(NS+1)+2 clocks per symbol (22 for 4 states), far less than the symbol period of the
// identification stage (one symbol per 128 audio samples). The result
// follows the cycle in which the window's last symbol is taken by
// NS*(NS+1)+4 clocks (24 for 4 states).
module hmm_classifier
  import sirpa_pkg::*;
#(
  parameter int unsigned NM   = N_MODELS,
  parameter int unsigned NS   = N_HMM_ST,
  parameter int unsigned NSYM = N_CENT,
  parameter int unsigned WIN  = OBS_LEN,
  localparam int unsigned MW  = (NM > 1) ? $clog2(NM) : 1,
  localparam int unsigned PAW = HMM_AW + MW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // parameter access
  input  logic                     wr_en,
  input  logic [PAW-1:0]           wr_addr,
  input  q_t                       wr_data,
  input  logic [PAW-1:0]           rd_addr,
  output q_t                       rd_data,
  // symbols
  input  logic                     sym_valid,
  input  logic [$clog2(NSYM)-1:0]  sym,
  output logic                     sym_ready,
  // classification
  output logic                     class_valid,
  output logic [MW-1:0]            class_id,
  output logp_t                    scores [NM]
);

  localparam int unsigned CW = $clog2(WIN + 1);

  logic [CW-1:0] pos;             // position of the next symbol in its window
  logic          first, last;
  assign first = (pos == '0);
  assign last  = (32'(pos) == WIN - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      pos <= '0;
    else if (sym_valid && sym_ready) pos <= last ? '0 : pos + 1'b1;
  end

  logic  e_ready [NM];
  logic  e_valid [NM];
  logp_t e_logp  [NM];
  q_t    e_rd    [NM];

  for (genvar m = 0; m < NM; m++) begin : g_model
    hmm_forward #(.NS(NS), .NSYM(NSYM)) u_fwd (
      .clk       (clk),
      .rst_n     (rst_n),
      .wr_en     (wr_en && 32'(wr_addr[PAW-1:HMM_AW]) == m),
      .wr_addr   (wr_addr[HMM_AW-1:0]),
      .wr_data   (wr_data),
      .rd_addr   (rd_addr[HMM_AW-1:0]),
      .rd_data   (e_rd[m]),
      .in_valid  (sym_valid && sym_ready),
      .in_sym    (sym),
      .in_first  (first),
      .in_last   (last),
      .in_ready  (e_ready[m]),
      .out_valid (e_valid[m]),
      .logp      (e_logp[m])
    );
  end

  // engines run in lock step; engine 0 speaks for all
  assign sym_ready = e_ready[0];
  assign rd_data   = (32'(rd_addr[PAW-1:HMM_AW]) < NM) ? e_rd[rd_addr[PAW-1:HMM_AW]] : '0;

  // best model
  logic [MW-1:0] best;
  always_comb begin
    best = '0;
    for (int m = 1; m < int'(NM); m++)
      if (e_logp[m] > e_logp[best]) best = MW'(m);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      class_valid <= 1'b0;
      class_id    <= '0;
      for (int m = 0; m < int'(NM); m++) scores[m] <= '0;
    end else begin
      class_valid <= e_valid[0];
      if (e_valid[0]) begin
        class_id <= best;
        for (int m = 0; m < int'(NM); m++) scores[m] <= e_logp[m];
      end
    end
  end

  for (genvar m = 1; m < NM; m++) begin : g_lockstep
    assert property (@(posedge clk) disable iff (!rst_n) e_ready[m] == e_ready[0] && e_valid[m] == e_valid[0])
      else $error("hmm_classifier: engines out of step");
  end

endmodule

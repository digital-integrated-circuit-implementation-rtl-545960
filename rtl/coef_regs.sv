// coef_regs -- programmable coefficient file of the identification stage.
//
// Holds every parameter the published design makes programmable after
// fabrication: the low-pass and high-pass QMF coefficient sets shared by all
// dyads of the filter bank, the mean vector and the 3x8 projection matrix of
// the dimensional reduction stage, and the centroids of the symbol
// generator. One write port and one read port (both word-wide, addressed by
// the register map in sirpa_pkg) connect it to the SPI slave; all words are
// also presented in parallel, in the shapes the datapath blocks take.
//
// Writes take effect on the next clock; reads are combinational. Reset
// clears every word to zero, so the stage is inert until it is programmed
// (the reset contents are this design's choice; the published coefficient
// values live in an external reference). Writes to addresses beyond the
// map are ignored and read back as zero.
module coef_regs
  import sirpa_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  q_t                wr_data,
  input  logic [ADDR_W-1:0] rd_addr,
  output q_t                rd_data,
  output iir_coef_t         coef_lp,
  output iir_coef_t         coef_hp,
  output q_t                mu   [N_BANDS],
  output q_t                w    [N_DIMS][N_BANDS],
  output q_t                cent [N_CENT][N_DIMS]
);

  q_t regs [N_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < int'(N_REGS); a++) regs[a] <= '0;
    end else if (wr_en && 32'(wr_addr) < N_REGS) begin
      regs[wr_addr] <= wr_data;
    end
  end

  assign rd_data = (32'(rd_addr) < N_REGS) ? regs[rd_addr] : '0;

  // coefficient order inside a set: b01 b11 a11 b02 b12 b22 a12 a22
  function automatic iir_coef_t unpack_set(input int unsigned base, input q_t r [N_REGS]);
    iir_coef_t c;
    c.b01 = r[base + 0];
    c.b11 = r[base + 1];
    c.a11 = r[base + 2];
    c.b02 = r[base + 3];
    c.b12 = r[base + 4];
    c.b22 = r[base + 5];
    c.a12 = r[base + 6];
    c.a22 = r[base + 7];
    return c;
  endfunction

  always_comb begin
    coef_lp = unpack_set(A_LP, regs);
    coef_hp = unpack_set(A_HP, regs);
    for (int i = 0; i < int'(N_BANDS); i++) mu[i] = regs[A_MU + i];
    for (int d = 0; d < int'(N_DIMS); d++)
      for (int i = 0; i < int'(N_BANDS); i++)
        w[d][i] = regs[A_W + N_BANDS*d + i];
    for (int k = 0; k < int'(N_CENT); k++)
      for (int d = 0; d < int'(N_DIMS); d++)
        cent[k][d] = regs[A_CENT + N_DIMS*k + d];
  end

endmodule

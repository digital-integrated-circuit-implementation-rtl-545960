// band_energy -- energy estimate of each filter bank band over one frame.
//
// The filter bank hands over every decimated band sample it produces
// (acc_en with the band number and the sample). The block squares it and
// adds it to that band's accumulator. At frame_end it divides each
// accumulator by the number of samples that band delivers in one frame and
// presents the eight means of squares as Q5.19 words, with out_valid high
// for one cycle, and clears the accumulators for the next frame.
//
// The published design only says that the energy per band is estimated
// with an averaging rule; the mean of squares over the frame is this
// design's choice. In a dyadic cascade of N_LEVELS dyads over FRAME_LEN
// input samples, band b (0 = lowest, the last low-pass output) receives
// FRAME_LEN >> (N_BANDS - b) samples for b >= 1 and one for b = 0, so the
// division is a right shift by max(b-1, 0) for the default sizes.
//
// Timing: one sample accepted per cycle; energies registered, valid one
// cycle after frame_end. frame_end and acc_en must not be high together.
module band_energy
  import sirpa_pkg::*;
#(
  parameter int unsigned NB    = N_BANDS,
  parameter int unsigned ACC_W = 2*DATA_W + 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   acc_en,     // a band sample is present
  input  logic [$clog2(NB)-1:0]  acc_band,   // its band, 0 = lowest
  input  q_t                     acc_x,      // the sample
  input  logic                   frame_end,  // close the frame
  output q_t                     energy [NB],// mean square per band, Q5.19
  output logic                   out_valid
);

  logic [ACC_W-1:0] acc [NB];

  // right shift that turns band b's sum into a mean
  function automatic int unsigned div_shift(input int unsigned b);
    return (b == 0) ? 0 : b - 1;
  endfunction

  logic [ACC_W-1:0] sq;
  always_comb sq = ACC_W'(unsigned'(mul_full(acc_x, acc_x)));

  // frame means: sum >> log2(sample count) >> FRAC_W, saturated
  q_t e_nxt [NB];
  always_comb begin
    for (int b = 0; b < int'(NB); b++) begin
      logic [ACC_W-1:0] m;
      m        = (acc[b] >> div_shift(b)) >> FRAC_W;
      e_nxt[b] = (m > ACC_W'(Q_MAX)) ? Q_MAX : q_t'(m);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < int'(NB); b++) begin
        acc[b]    <= '0;
        energy[b] <= '0;
      end
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (frame_end) begin
        for (int b = 0; b < int'(NB); b++) begin
          energy[b] <= e_nxt[b];
          acc[b]    <= '0;
        end
        out_valid <= 1'b1;
      end else if (acc_en) begin
        acc[acc_band] <= acc[acc_band] + sq;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(frame_end && acc_en))
    else $error("band_energy: frame_end and acc_en together");

endmodule

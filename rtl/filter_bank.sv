// filter_bank -- 8-band cascaded dyadic QMF filter bank with per-band
// energy output, built around a single time-shared IIR datapath.
//
// Structure (as published): N_LEVELS dyads in cascade. Each dyad splits
// its input with a low-pass and a high-pass third-order Cauer IIR filter
// and keeps every second output of each (decimation by two). The high-pass
// output of dyad k is a band; the low-pass output feeds dyad k+1; the
// low-pass output of the last dyad is the lowest band. With 7 dyads on a
// 44.1 kHz input the bank delivers one energy vector every 128 samples
// (344.53125 Hz). All dyads use the same two coefficient sets (LP, HP);
// only one iir_qmf instance exists, and a small FSM steps it through the
// dyads that have a new input at the current sample, one filter step per
// clock. A register bank keeps the three state words of every filter
// (N_LEVELS x 2 x 3 words of 24 bits).
//
// Schedule (this design's choice): with n the sample index inside the
// frame, dyad k (0-based) gets a new input when the low k bits of n are all
// ones, and keeps its outputs when the low k+1 bits are all ones, so the
// frame closes on its last sample. A sample takes 2 cycles per active dyad
// plus one; the last sample of a frame runs all 7 dyads (14 cycles) plus
// one cycle to close the frame, so the block accepts a sample every 16
// clocks at worst -- 16 x 44.1 kHz = 705.6 kHz, the minimum clock the
// published design names.
//
// Interface: in_valid/in_x present a sample; it is taken when in_ready is
// high, and a sample offered while in_ready is low is lost and flagged by
// overrun. band_valid/band_idx/band_x show every decimated band sample.
// energy/out_valid carry the frame's band energies (see band_energy).
module filter_bank
  import sirpa_pkg::*;
#(
  parameter int unsigned LEVELS = N_LEVELS,
  localparam int unsigned NB    = LEVELS + 1,
  localparam int unsigned BW    = $clog2(NB),
  localparam int unsigned LW    = (LEVELS > 1) ? $clog2(LEVELS) : 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  q_t         in_x,
  output logic       in_ready,
  output logic       overrun,
  input  iir_coef_t  coef_lp,
  input  iir_coef_t  coef_hp,
  output logic       band_valid,
  output logic [BW-1:0] band_idx,
  output q_t         band_x,
  output q_t         energy [NB],
  output logic       out_valid
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FINAL} fb_state_e;

  fb_state_e          state;
  logic [LEVELS-1:0]  n;          // sample index inside the frame
  logic [LW-1:0]      lvl;        // dyad being computed
  qmf_sel_e           sel;        // its LP or HP filter
  q_t                 x_lvl;      // input sample of that dyad
  q_t                 lp_y;       // LP output of that dyad (next dyad's input)
  iir_state_t         bank [LEVELS][2];

  // one shared filter datapath
  q_t         f_y;
  iir_state_t f_st_nxt;
  iir_coef_t  f_coef;
  iir_state_t f_st;

  always_comb begin
    f_coef = (sel == SEL_LP) ? coef_lp : coef_hp;
    f_st   = bank[lvl][sel];
  end

  iir_qmf u_iir (
    .x      (x_lvl),
    .coef   (f_coef),
    .st     (f_st),
    .y      (f_y),
    .st_nxt (f_st_nxt)
  );

  // does the current dyad keep (decimate to) this output?
  logic keep;
  always_comb begin
    logic [LEVELS-1:0] mask;
    mask = LEVELS'((1 << (32'(lvl) + 1)) - 1);
    keep = ((n & mask) == mask);
  end

  logic last_lvl;
  assign last_lvl = (32'(lvl) == LEVELS - 1);

  // band samples: the HP output of dyad k is band NB-1-k, the LP output of
  // the last dyad is band 0
  always_comb begin
    band_valid = 1'b0;
    band_idx   = '0;
    band_x     = f_y;
    if (state == S_RUN && keep) begin
      if (sel == SEL_HP) begin
        band_valid = 1'b1;
        band_idx   = BW'(NB - 1 - 32'(lvl));
      end else if (last_lvl) begin
        band_valid = 1'b1;
        band_idx   = '0;
      end
    end
  end

  assign in_ready = (state == S_IDLE);
  assign overrun  = in_valid && !in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      n     <= '0;
      lvl   <= '0;
      sel   <= SEL_LP;
      x_lvl <= '0;
      lp_y  <= '0;
      for (int k = 0; k < int'(LEVELS); k++)
        for (int s = 0; s < 2; s++)
          bank[k][s] <= '0;
    end else begin
      case (state)
        S_IDLE: if (in_valid) begin
          x_lvl <= in_x;
          lvl   <= '0;
          sel   <= SEL_LP;
          state <= S_RUN;
        end
        S_RUN: begin
          bank[lvl][sel] <= f_st_nxt;
          if (sel == SEL_LP) begin
            lp_y <= f_y;
            sel  <= SEL_HP;
          end else begin
            sel <= SEL_LP;
            if (keep && !last_lvl) begin
              lvl   <= lvl + 1'b1;
              x_lvl <= lp_y;
            end else begin
              lvl   <= '0;
              n     <= n + 1'b1;
              state <= (&n) ? S_FINAL : S_IDLE;
            end
          end
        end
        S_FINAL: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  band_energy #(.NB(NB)) u_energy (
    .clk       (clk),
    .rst_n     (rst_n),
    .acc_en    (band_valid),
    .acc_band  (band_idx),
    .acc_x     (band_x),
    .frame_end (state == S_FINAL),
    .energy    (energy),
    .out_valid (out_valid)
  );

endmodule

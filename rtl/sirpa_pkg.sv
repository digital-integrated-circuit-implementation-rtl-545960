// sirpa_pkg -- shared types, sizes and fixed-point arithmetic for the
// acoustic identification stage (filter bank, dimensional reduction,
// symbol generator, HMM classifier).
//
// Every datapath word is a signed two's-complement Q5.19 number: 24 bits,
// 5 integer bits (sign included) and 19 fractional bits, so one LSB is
// 2^-19 (about 1.907e-6). This word format follows the published design.
// How products are rounded (truncation towards minus infinity after an
// arithmetic shift) and that every result saturates at the Q5.19 range
// instead of wrapping are this design's own choices.
//
// The register map used by the SPI-programmable coefficient file is also
// defined here so that the register file and testbenches agree on it.
package sirpa_pkg;

  // ---------------------------------------------------------------- word
  localparam int unsigned DATA_W = 24;  // total bits of a Q5.19 word
  localparam int unsigned FRAC_W = 19;  // fractional bits
  typedef logic signed [DATA_W-1:0] q_t;

  localparam q_t Q_MAX = {1'b0, {(DATA_W-1){1'b1}}};
  localparam q_t Q_MIN = {1'b1, {(DATA_W-1){1'b0}}};

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_BANDS   = 8;    // filter bank bands
  localparam int unsigned N_LEVELS  = 7;    // dyads in the cascade (N_BANDS-1)
  localparam int unsigned FRAME_LEN = 128;  // input samples per bank output
  localparam int unsigned N_DIMS    = 3;    // reduced space dimension
  localparam int unsigned N_CENT    = 16;   // centroids (symbol alphabet size)
  localparam int unsigned SYM_W     = $clog2(N_CENT);

  // ------------------------------------------------------- IIR section
  // Coefficients of one QMF section: a first-order section followed by a
  // second-order section, denominators normalised so that a01 = a02 = 1,
  // and the gain G folded into b01 and b11.
  typedef struct packed {
    q_t b01;
    q_t b11;
    q_t a11;
    q_t b02;
    q_t b12;
    q_t b22;
    q_t a12;
    q_t a22;
  } iir_coef_t;

  // Transposed direct form II state of one filter: one word for the
  // first-order section, two for the second-order section.
  typedef struct packed {
    q_t s0;
    q_t s1;
    q_t s2;
  } iir_state_t;

  typedef enum logic {SEL_LP = 1'b0, SEL_HP = 1'b1} qmf_sel_e;

  typedef q_t band_vec_t [N_BANDS];
  typedef q_t dim_vec_t  [N_DIMS];

  // ------------------------------------------------------ register map
  // SPI word address space (15 bits): the coefficient file occupies
  // 0..N_REGS-1 (7-bit local address), the HMM model memories start at
  // A_HMM, one block of HMM_STRIDE words per model.
  localparam int unsigned SPI_AW     = 15;
  localparam int unsigned ADDR_W     = 7;
  localparam int unsigned A_LP       = 0;                  // 8 words: LP section
  localparam int unsigned A_HP       = 8;                  // 8 words: HP section
  localparam int unsigned A_MU       = 16;                 // 8 words: projection mean
  localparam int unsigned A_W        = 24;                 // 24 words: W[d][i] at A_W + 8*d + i
  localparam int unsigned A_CENT     = 48;                 // 48 words: C[k][d] at A_CENT + 3*k + d
  localparam int unsigned N_REGS     = A_CENT + N_CENT * N_DIMS;  // 96

  // ------------------------------------------------------ HMM classifier
  localparam int unsigned N_MODELS   = 3;    // one HMM per class
  localparam int unsigned N_HMM_ST   = 4;    // hidden states per model
  localparam int unsigned OBS_LEN    = 32;   // symbols per classified window
  localparam int unsigned A_HMM      = 256;  // base of model 0 parameters
  localparam int unsigned HMM_STRIDE = 128;  // words per model block
  localparam int unsigned HMM_AW     = 7;    // word address inside a block
  // inside a block: pi[j] at j, A[i][j] at N + N*i + j,
  // B[j][o] at N + N*N + N_CENT*j + o
  // log2-likelihood: signed, 8 fractional bits
  localparam int unsigned LOGP_W     = 24;
  typedef logic signed [LOGP_W-1:0] logp_t;
  localparam logp_t LOGP_MIN = {1'b1, {(LOGP_W-1){1'b0}}};

  // ------------------------------------------------ fixed-point helpers
  // Saturate a wide signed value to Q5.19.
  function automatic q_t sat(input logic signed [63:0] v);
    if (v > 64'(signed'(Q_MAX)))      return Q_MAX;
    else if (v < 64'(signed'(Q_MIN))) return Q_MIN;
    else                              return q_t'(v);
  endfunction

  // Full-precision product of two Q5.19 words (Q10.38 in 48 bits).
  function automatic logic signed [2*DATA_W-1:0] mul_full(input q_t a, input q_t b);
    return (2*DATA_W)'(a) * (2*DATA_W)'(b);
  endfunction

  // Q5.19 product, truncated back to 19 fractional bits, kept wide so the
  // caller can add before saturating.
  function automatic logic signed [63:0] mul_q(input q_t a, input q_t b);
    logic signed [63:0] p;
    p = 64'(mul_full(a, b));
    return p >>> FRAC_W;
  endfunction

endpackage

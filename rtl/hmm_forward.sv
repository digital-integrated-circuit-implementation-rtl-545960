// hmm_forward -- scores one hidden Markov model lambda = <A, B, pi> against a
// window of observation symbols with the forward algorithm and returns
// log2 P(O | lambda).
//
// The published classifier runs the forward algorithm for one model per
// class, with a floating-point unit and a microcoded controller. This
// engine computes the same quantity in fixed point with a plain FSM
// (this design's choice): the forward variables alpha are kept as Q5.19
// words and renormalised after every symbol by a power of two, so that
// their sum lies in [0.5, 1); the shifts are counted and the logarithm is
// assembled at the end of the window as
//   log2 P = log2(S) - K,   S in [0.5, 1), K = total left shifts,
// with log2(S) approximated piecewise-linearly (-1 + mantissa fraction,
// error below 0.09). The result is a signed number with 8 fractional bits.
// A model whose alpha vector becomes all zero scores LOGP_MIN.
//
// Datapath: one multiplier, one adder and a single read port into the
// model memory (pi, A, B; layout in sirpa_pkg), all time-shared:
//   alpha'_j = ( sum_i alpha_i * A[i][j] ) * B[j][o]   (pi_j for the first symbol)
// Per symbol: NS*(NS+1) clocks (NS+1 for the first), one normalisation
// clock, and at the end of the window one clock for the logarithm.
//
// Interface: in_valid/in_sym/in_first/in_last give one symbol, taken when
// in_ready is high; out_valid/logp give the score one clock after the last
// symbol is processed. wr_*/rd_* reach the model memory (writes take a
// clock, reads are combinational).
module hmm_forward
  import sirpa_pkg::*;
#(
  parameter int unsigned NS   = N_HMM_ST,
  parameter int unsigned NSYM = N_CENT
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // model memory access
  input  logic                     wr_en,
  input  logic [HMM_AW-1:0]        wr_addr,
  input  q_t                       wr_data,
  input  logic [HMM_AW-1:0]        rd_addr,
  output q_t                       rd_data,
  // observation symbols
  input  logic                     in_valid,
  input  logic [$clog2(NSYM)-1:0]  in_sym,
  input  logic                     in_first,
  input  logic                     in_last,
  output logic                     in_ready,
  // score
  output logic                     out_valid,
  output logp_t                    logp
);

  localparam int unsigned IW    = (NS > 1) ? $clog2(NS) : 1;
  localparam int unsigned SUM_W = DATA_W + IW + 1;
  localparam int unsigned AW    = 2*DATA_W + 8;
  localparam int unsigned A_A   = NS;             // A[i][j]
  localparam int unsigned A_B   = NS + NS*NS;     // B[j][o]

  // -------------------------------------------------------- model memory
  q_t mem [2**HMM_AW];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end
  assign rd_data = mem[rd_addr];

  // ---------------------------------------------------------------- FSM
  typedef enum logic [2:0] {S_IDLE, S_MAC, S_EMIT, S_NORM, S_LOG} hf_state_e;

  hf_state_e                 state;
  logic [IW-1:0]             i, j;
  logic                      first_r, last_r, dead;
  logic [$clog2(NSYM)-1:0]   sym_r;
  logic signed [AW-1:0]      acc;
  q_t                        alpha     [NS];
  q_t                        alpha_new [NS];
  logic [SUM_W-1:0]          sum;
  logic [FRAC_W-1:0]         sum_n;      // normalised sum, in [2^18, 2^19)
  logic signed [15:0]        scale;      // total left shifts K

  // the single memory read port of the datapath
  logic [HMM_AW-1:0] m_addr;
  q_t                m_word;
  always_comb begin
    if (state == S_EMIT)  m_addr = HMM_AW'(A_B + NSYM*32'(j) + 32'(sym_r));
    else if (first_r)     m_addr = HMM_AW'(j);
    else                  m_addr = HMM_AW'(A_A + NS*32'(i) + 32'(j));
    m_word = mem[m_addr];
  end

  // the single multiplier and adder
  q_t                    mac_a;
  logic signed [AW-1:0]  prod;
  q_t                    t_q, p_q;
  always_comb begin
    t_q   = sat(64'(acc >>> FRAC_W));
    mac_a = (state == S_EMIT) ? t_q : alpha[i];
    prod  = AW'(mul_full(mac_a, m_word));
    p_q   = sat(64'(prod >>> FRAC_W));
    if (p_q < 0) p_q = '0;          // probabilities are never negative
  end

  // normalisation shift: k = 18 - position of the leading one of sum
  logic signed [7:0] k;
  always_comb begin
    k = '0;
    for (int b = 0; b < int'(SUM_W); b++)
      if (sum[b]) k = 8'(18 - b);
  end

  function automatic q_t shift_k(input logic [SUM_W-1:0] v, input logic signed [7:0] sh);
    logic [SUM_W-1:0] r;
    r = (sh >= 0) ? (v << sh) : (v >> (-sh));
    return q_t'(r[DATA_W-1:0]);   // the normalised value fits in DATA_W bits
  endfunction

  // the 8 bits below the leading one of the normalised sum: log2(1+m) ~ m
  logic [7:0] mant8;
  assign mant8 = sum_n[FRAC_W-2 -: 8];

  assign in_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      i         <= '0;
      j         <= '0;
      first_r   <= 1'b0;
      last_r    <= 1'b0;
      dead      <= 1'b0;
      sym_r     <= '0;
      acc       <= '0;
      sum       <= '0;
      sum_n     <= '0;
      scale     <= '0;
      out_valid <= 1'b0;
      logp      <= '0;
      for (int s = 0; s < int'(NS); s++) begin
        alpha[s]     <= '0;
        alpha_new[s] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      case (state)
        S_IDLE: if (in_valid) begin
          sym_r   <= in_sym;
          first_r <= in_first;
          last_r  <= in_last;
          i       <= '0;
          j       <= '0;
          acc     <= '0;
          sum     <= '0;
          if (in_first) begin
            scale <= '0;
            dead  <= 1'b0;
          end
          state <= S_MAC;
        end
        S_MAC: begin
          if (first_r) begin
            acc   <= AW'(m_word) <<< FRAC_W;      // pi_j
            state <= S_EMIT;
          end else begin
            acc <= acc + prod;                    // alpha_i * A[i][j]
            if (32'(i) == NS - 1) begin
              i     <= '0;
              state <= S_EMIT;
            end else begin
              i <= i + 1'b1;
            end
          end
        end
        S_EMIT: begin                             // times B[j][o]
          alpha_new[j] <= p_q;
          sum          <= sum + SUM_W'(unsigned'(p_q));
          acc          <= '0;
          if (32'(j) == NS - 1) begin
            state <= S_NORM;
          end else begin
            j     <= j + 1'b1;
            state <= S_MAC;
          end
        end
        S_NORM: begin
          if (sum == '0) begin
            dead <= 1'b1;
            for (int s = 0; s < int'(NS); s++) alpha[s] <= '0;
            sum_n <= FRAC_W'(1) << (FRAC_W - 1);
          end else begin
            for (int s = 0; s < int'(NS); s++)
              alpha[s] <= shift_k(SUM_W'(unsigned'(alpha_new[s])), k);
            sum_n <= FRAC_W'(shift_k(sum, k));
            scale <= scale + 16'(k);
          end
          state <= last_r ? S_LOG : S_IDLE;
        end
        S_LOG: begin
          if (dead) logp <= LOGP_MIN;
          else      logp <= (LOGP_W'(-32'sd1 - 32'(scale)) <<< 8) + LOGP_W'(mant8);
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

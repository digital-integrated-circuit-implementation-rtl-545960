// dim_reduction -- sequential mean-centred linear projection y = W (x - mu)
// from the 8-dimensional band-energy space to a 3-dimensional space.
//
// As in the published design the block owns a single subtracter, a single
// multiplier and a single adder and works through the product one element
// per clock under control of a small FSM; mu and W are programmable and
// come from the coefficient register file.
//
//   cycle 0          in_valid: the input vector is captured
//   cycles 1..8      xc[i] = x[i] - mu[i]                  (subtracter)
//   cycles 9..32     acc  += W[d][i] * xc[i], d-major      (multiplier, adder)
//                    each dimension's sum is closed after its 8th term
//   cycle 33         results registered, out_valid rises for cycle 34
//
// so a result appears 34 clocks after its input, the figure the published
// design gives (45 us at 749 kHz). The products are summed at full
// precision in a wide accumulator and each output is truncated to Q5.19
// and saturated once (this design's choice). The centred input xc[i] is
// saturated to Q5.19. in_ready is low while a vector is being processed;
// a vector offered then is ignored.
module dim_reduction
  import sirpa_pkg::*;
#(
  parameter int unsigned NX = N_BANDS,
  parameter int unsigned NY = N_DIMS
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  q_t     x   [NX],
  output logic   in_ready,
  input  q_t     mu  [NX],
  input  q_t     w   [NY][NX],
  output q_t     y   [NY],
  output logic   out_valid
);

  localparam int unsigned XW = $clog2(NX);
  localparam int unsigned YW = (NY > 1) ? $clog2(NY) : 1;
  localparam int unsigned AW = 2*DATA_W + 8;

  typedef enum logic [1:0] {S_IDLE, S_CENTER, S_MAC, S_OUT} dr_state_e;

  dr_state_e             state;
  logic [XW-1:0]         i;
  logic [YW-1:0]         d;
  q_t                    xr  [NX];   // captured input, then centred in place
  logic signed [AW-1:0]  acc;
  q_t                    yr  [NY];

  // the single subtracter, multiplier and adder
  q_t                    diff;
  logic signed [AW-1:0]  prod;
  logic signed [AW-1:0]  sum;
  always_comb begin
    diff = sat(64'(xr[i]) - 64'(mu[i]));
    prod = AW'(mul_full(w[d][i], xr[i]));
    sum  = acc + prod;
  end

  assign in_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      i         <= '0;
      d         <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      for (int k = 0; k < int'(NX); k++) xr[k] <= '0;
      for (int k = 0; k < int'(NY); k++) begin
        yr[k] <= '0;
        y[k]  <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      case (state)
        S_IDLE: if (in_valid) begin
          for (int k = 0; k < int'(NX); k++) xr[k] <= x[k];
          i     <= '0;
          state <= S_CENTER;
        end
        S_CENTER: begin
          xr[i] <= diff;
          if (32'(i) == NX - 1) begin
            i     <= '0;
            d     <= '0;
            acc   <= '0;
            state <= S_MAC;
          end else begin
            i <= i + 1'b1;
          end
        end
        S_MAC: begin
          if (32'(i) == NX - 1) begin
            yr[d] <= sat(64'(sum >>> FRAC_W));
            acc   <= '0;
            i     <= '0;
            if (32'(d) == NY - 1) state <= S_OUT;
            else                  d     <= d + 1'b1;
          end else begin
            acc <= sum;
            i   <= i + 1'b1;
          end
        end
        S_OUT: begin
          for (int k = 0; k < int'(NY); k++) y[k] <= yr[k];
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

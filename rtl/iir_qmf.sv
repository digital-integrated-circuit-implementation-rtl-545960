// iir_qmf -- one step of the third-order QMF Cauer IIR filter used by every
// dyad of the filter bank.
//
// The filter is the product of a first-order and a second-order section,
//   H(z) = G (b01 + b11 z^-1)/(1 + a11 z^-1)
//          * (b02 + b12 z^-1 + b22 z^-2)/(1 + a12 z^-1 + a22 z^-2),
// as in the published design. The same datapath serves the low-pass and the
// high-pass half of a dyad and all dyads: only the coefficient set and the
// three state words handed to it change. The block is purely combinational:
// given input x, coefficients and the filter's current state it returns
// the output y and the next state in the same cycle, so one filter step
// takes one clock of the scheduler in filter_bank.
//
// Both sections use the transposed direct form II, which needs exactly the
// eight multipliers of the published structure (the gain G is folded into
// b01 and b11 by whoever programs the coefficients, and a01 = a02 = 1).
// The form itself, truncating products to Q5.19 and saturating every state
// and output word are this design's choices.
//
//   y1  = b01*x + s0           s0' = b11*x - a11*y1
//   y   = b02*y1 + s1          s1' = b12*y1 - a12*y + s2
//                              s2' = b22*y1 - a22*y
module iir_qmf
  import sirpa_pkg::*;
(
  input  q_t          x,       // filter input sample, Q5.19
  input  iir_coef_t   coef,    // coefficient set (LP or HP)
  input  iir_state_t  st,      // current state of this filter
  output q_t          y,       // filter output, Q5.19
  output iir_state_t  st_nxt   // state after this step
);

  q_t y1;

  always_comb begin
    y1            = sat(mul_q(coef.b01, x) + 64'(st.s0));
    st_nxt.s0     = sat(mul_q(coef.b11, x) - mul_q(coef.a11, y1));
    y             = sat(mul_q(coef.b02, y1) + 64'(st.s1));
    st_nxt.s1     = sat(mul_q(coef.b12, y1) - mul_q(coef.a12, y) + 64'(st.s2));
    st_nxt.s2     = sat(mul_q(coef.b22, y1) - mul_q(coef.a22, y));
  end

endmodule

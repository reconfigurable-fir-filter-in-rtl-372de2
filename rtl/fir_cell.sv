// fir_cell: one reconfigurable tap of the FIR filter (the "basic cell").
//
// Three signals arrive from the previous cell, S(p), M(p) and A(p), and three
// leave for the next one, S(n), M(n) and A(n).  Inside:
//   Mux 1  picks S(p), M(p), A(p) or the spare input; that value either goes
//          straight to S(n) or through a one-step delay register (Mux 2).
//   Mux 3  picks the multiplier operand from S(p), M(p), A(p) or the
//          multiplication constant;  M(n) = S(n) * operand.
//   Mux 4  picks the adder operand from S(p), M(p), A(p) or the addition
//          constant;                 A(n) = M(n) + operand.
// With Mux 1 = S(p), Mux 2 = delayed, Mux 3 = constant k and Mux 4 = A(p) the
// cell is one tap of the direct-form FIR filter: it delays the sample line,
// multiplies its sample by k and adds the product to the running sum.
//
// The multiplexers, the single delay, the multiplier and the adder and what
// each may select follow the published design; that the adder's other operand is the
// product M(n), the select codes, the wrap-around integer arithmetic and the
// step enable are this design's choices.
//
// Timing: M(n) and A(n) are combinational.  The delay register loads on a
// clock edge with step = 1 (one step per input sample; tie step high to
// advance every clock).  Configuration may change at any time; the delay
// register keeps its contents across a change, so no reset is needed.
module fir_cell
  import fir_pkg::*;
(
  input  logic      clk,
  input  logic      rst,    // synchronous, clears the delay register
  input  logic      step,   // advance the delay register by one sample
  input  cell_cfg_t cfg,
  input  sample_t   spare,  // fourth input of Mux 1
  input  sample_t   s_p,
  input  sample_t   m_p,
  input  sample_t   a_p,
  output sample_t   s_n,
  output sample_t   m_n,
  output sample_t   a_n
);

  sample_t mux1_q, delay_q, mul_op, add_op;

  function automatic sample_t pick(src_e sel, sample_t s, sample_t m,
                                   sample_t a, sample_t c);
    unique case (sel)
      SRC_S:   return s;
      SRC_M:   return m;
      SRC_A:   return a;
      default: return c;
    endcase
  endfunction

  always_comb begin
    mux1_q = pick(cfg.sel.mux1, s_p, m_p, a_p, spare);
    mul_op = pick(cfg.sel.mux3, s_p, m_p, a_p, cfg.mul_k);
    add_op = pick(cfg.sel.mux4, s_p, m_p, a_p, cfg.add_k);
  end

  always_ff @(posedge clk) begin
    if (rst)       delay_q <= '0;
    else if (step) delay_q <= mux1_q;
  end

  always_comb begin
    s_n = (cfg.sel.mux2 == S_DELAYED) ? delay_q : mux1_q;
    m_n = sample_t'(s_n * mul_op);
    a_n = sample_t'(m_n + add_op);
  end

endmodule

// fir_ref_pkg: reference model of the basic-cell chain for the testbenches.
//
// Written from the cell's description, not from the RTL: a cell picks a
// source for its S path (previous S, M, A or the spare value), optionally
// takes that source from a register that remembers it from the previous step,
// multiplies S by a selected operand and adds a selected operand to the
// product.  Arithmetic is on 16-bit two's-complement values, wrapping.
// The state of a chain is the input-sample register plus one register per
// cell.  eval() returns the last cell's three outputs for a given state;
// advance() applies one step.
package fir_ref_pkg;

  localparam int MAXC = 64;

  typedef struct {
    int unsigned sel;   // S6..S0 in bits 6..0
    shortint     k;
    shortint     c;
  } ref_cfg_t;

  typedef struct {
    shortint x;
    shortint d [MAXC];
  } ref_state_t;

  function automatic shortint choose(int unsigned code, shortint s, shortint m,
                                     shortint a, shortint other);
    case (code & 3)
      0: return s;
      1: return m;
      2: return a;
      default: return other;
    endcase
  endfunction

  // Outputs of every cell; mux1_out[i] is what cell i's register would load.
  function automatic void chain(input ref_cfg_t cfg [MAXC], input int n,
                                input ref_state_t st,
                                output shortint s_o [MAXC+1],
                                output shortint m_o [MAXC+1],
                                output shortint a_o [MAXC+1],
                                output shortint mux1_out [MAXC]);
    shortint sp, mp, ap, v1, mo, ao;
    sp = st.x; mp = 0; ap = 0;
    for (int i = 0; i < n; i++) begin
      v1 = choose(cfg[i].sel, sp, mp, ap, 0);
      mux1_out[i] = v1;
      s_o[i] = ((cfg[i].sel >> 2) & 1) != 0 ? st.d[i] : v1;
      mo = shortint'(int'(s_o[i]) * int'(choose(cfg[i].sel >> 3, sp, mp, ap, cfg[i].k)));
      ao = shortint'(int'(mo) + int'(choose(cfg[i].sel >> 5, sp, mp, ap, cfg[i].c)));
      m_o[i] = mo; a_o[i] = ao;
      sp = s_o[i]; mp = mo; ap = ao;
    end
    s_o[n] = sp; m_o[n] = mp; a_o[n] = ap;
  endfunction

  function automatic void eval(input ref_cfg_t cfg [MAXC], input int n,
                               input ref_state_t st,
                               output shortint s_last, output shortint m_last,
                               output shortint a_last);
    shortint s_o [MAXC+1], m_o [MAXC+1], a_o [MAXC+1], mux1 [MAXC];
    chain(cfg, n, st, s_o, m_o, a_o, mux1);
    s_last = s_o[n]; m_last = m_o[n]; a_last = a_o[n];
  endfunction

  function automatic void advance(input ref_cfg_t cfg [MAXC], input int n,
                                  inout ref_state_t st, input shortint x_new);
    shortint s_o [MAXC+1], m_o [MAXC+1], a_o [MAXC+1], mux1 [MAXC];
    chain(cfg, n, st, s_o, m_o, a_o, mux1);
    for (int i = 0; i < n; i++) st.d[i] = mux1[i];
    st.x = x_new;
  endfunction

endpackage

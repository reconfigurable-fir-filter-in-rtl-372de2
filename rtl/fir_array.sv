// fir_array: the reconfigurable FIR filter, N_CELLS basic cells in a line.
//
// The outputs S(n), M(n), A(n) of cell i are the inputs S(p), M(p), A(p) of
// cell i+1.  The first cell receives the input sample x on S(p) and zero on
// M(p) and A(p); the filter output y is A(n) of the last cell, and the three
// outputs of the last cell are also brought out.  Every cell has its own
// configuration word, so both the coefficients and the topology (which cells
// delay, multiply or add, and hence the number of taps) are set from outside.
// The spare input of every cell's Mux 1 is tied to zero.
//
// Following the published design, cells are joined only linearly; the zero inputs of
// the first cell, the zero spare inputs and the choice of A(n) of the last
// cell as output are this design's choices.  The input sample is held in a
// register loaded on step, so with the canonical configuration
// (first cell undelayed, the others delayed, Mux 3 = k_i, Mux 4 = A(p))
//     y = k0*x(n) + k1*x(n-1) + ... + k(N-1)*x(n-N+1)
// one clock after the step that loads x(n).  y is combinational in the
// registers; its path runs through all N cells.
module fir_array
  import fir_pkg::*;
#(
  parameter int unsigned N_CELLS = 16
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      step,              // accept x_in and shift every delay
  input  sample_t   x_in,
  input  cell_cfg_t cfg [N_CELLS],
  output sample_t   y,                 // A(n) of the last cell
  output sample_t   s_last,
  output sample_t   m_last
);

  sample_t x_q;                        // sample now at the filter input
  sample_t s [N_CELLS+1];
  sample_t m [N_CELLS+1];
  sample_t a [N_CELLS+1];

  always_ff @(posedge clk) begin
    if (rst)       x_q <= '0;
    else if (step) x_q <= x_in;
  end

  assign s[0] = x_q;
  assign m[0] = '0;
  assign a[0] = '0;

  for (genvar i = 0; i < N_CELLS; i++) begin : g_cell
    fir_cell u_cell (
      .clk   (clk),
      .rst   (rst),
      .step  (step),
      .cfg   (cfg[i]),
      .spare ('0),
      .s_p   (s[i]),
      .m_p   (m[i]),
      .a_p   (a[i]),
      .s_n   (s[i+1]),
      .m_n   (m[i+1]),
      .a_n   (a[i+1])
    );
  end

  assign y      = a[N_CELLS];
  assign s_last = s[N_CELLS];
  assign m_last = m[N_CELLS];

endmodule

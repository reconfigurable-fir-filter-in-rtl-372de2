// fir_pkg: types and constants shared by the reconfigurable FIR filter.
//
// Every signal travelling between basic cells (S, M and A) is a signed
// DATA_W-bit two's-complement integer; products and sums wrap modulo
// 2^DATA_W, so a multiplication constant of 1 and an addition constant of 0
// leave a value unchanged, as the cell's bypass settings require.
//
// A cell is configured by seven selection bits S0..S6 (the count of seven is
// the published design's; the grouping below follows the four multiplexers of the cell)
// plus a multiplication constant and an addition constant.  The order of the
// multiplexer inputs, the value of each select code and the word widths are
// this design's own choices.
//
// Packed layout of the selection bits (bit i = Si):
//   [1:0] mux1 select {S1,S0}: source of the S path
//   [2]   mux2 select S2     : 0 = S path without delay, 1 = through the delay
//   [4:3] mux3 select {S4,S3}: multiplier operand
//   [6:5] mux4 select {S6,S5}: adder operand
package fir_pkg;

  localparam int unsigned DATA_W = 16;  // width of S, M, A and the constants
  localparam int unsigned SEL_W  = 7;   // selection bits per cell

  typedef logic signed [DATA_W-1:0] sample_t;

  // Input choice of each 4-input multiplexer.  Code 3 is the "Spare" input on
  // Mux 1 and the cell's constant on Mux 3 / Mux 4.
  typedef enum logic [1:0] {
    SRC_S     = 2'd0,  // S(p) of the previous cell
    SRC_M     = 2'd1,  // M(p) of the previous cell
    SRC_A     = 2'd2,  // A(p) of the previous cell
    SRC_CONST = 2'd3   // spare input (Mux 1) or the cell constant (Mux 3/4)
  } src_e;

  typedef enum logic {
    S_DIRECT  = 1'b0,  // S(n) follows Mux 1 with no delay
    S_DELAYED = 1'b1   // S(n) is Mux 1 delayed by one sample step
  } dly_e;

  typedef struct packed {
    src_e mux4;  // S6,S5
    src_e mux3;  // S4,S3
    dly_e mux2;  // S2
    src_e mux1;  // S1,S0
  } cell_sel_t;

  typedef struct packed {
    cell_sel_t sel;
    sample_t   mul_k;  // multiplication constant (the tap coefficient)
    sample_t   add_k;  // addition constant
  } cell_cfg_t;

  // Power-up configuration: canonical delay line on S, coefficient 0, adder
  // passes A(p) on.  A chain of such cells outputs 0 and lets a shorter
  // filter placed in front of it pass unchanged.
  localparam cell_cfg_t CFG_IDLE = '{
    sel:   '{mux4: SRC_A, mux3: SRC_CONST, mux2: S_DELAYED, mux1: SRC_S},
    mul_k: '0,
    add_k: '0
  };

  // Serial command bytes (this design's own protocol).
  localparam logic [7:0] CMD_CFG    = 8'hC0;  // + cell, sel, k_hi, k_lo, c_hi, c_lo
  localparam logic [7:0] CMD_SAMPLE = 8'hD0;  // + x_hi, x_lo ; answers y_hi, y_lo

endpackage

// cfg_bank: configuration store of the reconfigurable FIR filter.
//
// One cell_cfg_t word per basic cell: the seven selection bits, the
// multiplication constant and the addition constant.  A write replaces the
// whole word of one cell in a single clock edge while every other word and
// all sample data in the filter stay untouched, so the filter can be given
// new coefficients or a new topology while it runs, without a reset.  Writes
// to a cell index of N_CELLS or more are ignored.
//
// That configuration is rewritten on the fly without resetting follows the
// published design; the one-word-per-cell write port, the ignore rule and the reset
// value (fir_pkg::CFG_IDLE, a filter whose output is 0) are this design's.
//
// Timing: cfg shows a write from the clock edge that takes it.
module cfg_bank
  import fir_pkg::*;
#(
  parameter int unsigned N_CELLS = 16,
  parameter int unsigned ADDR_W  = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  cell_cfg_t         wdata,
  output cell_cfg_t         cfg [N_CELLS]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N_CELLS; i++) cfg[i] <= CFG_IDLE;
    end else if (we) begin
      for (int i = 0; i < N_CELLS; i++)
        if (32'(waddr) == i) cfg[i] <= wdata;
    end
  end

endmodule

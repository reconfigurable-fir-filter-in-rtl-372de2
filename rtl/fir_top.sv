// fir_top: reconfigurable FIR filter controlled over a serial link.
//
// A PC sends configuration words and input samples over RS-232.  uart_rx
// turns the line into bytes, cmd_parser decodes them into writes to cfg_bank
// (selection bits and constants of every basic cell) and into input samples,
// which step fir_array, the line of N_CELLS basic cells.  The filter output
// goes back to the PC through uart_tx, two bytes per sample.  Configuration
// is overwritten while the filter runs; nothing has to be reset or reloaded
// to change the coefficients or the topology.
//
// The chain of basic cells, the on-line download of configuration bits,
// coefficients and data over a serial port, and reconfiguration without reset
// follow the published design.  The number of cells, word widths, bit rate and byte
// protocol are this design's choices (see fir_pkg and cmd_parser).
//
// Interface: clk, synchronous active-high rst, serial in/out (logic levels;
// an RS-232 level shifter sits outside), and for observation the three
// outputs of the last cell (y = A(n) is the filter output) and two error
// pulses.  Timing: a result leaves about 0.5 bit time after the last
// byte of its sample command has been received.
module fir_top
  import fir_pkg::*;
#(
  parameter int unsigned N_CELLS      = 16,
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    uart_rxd,
  output logic    uart_txd,
  output sample_t y,          // A(n) of the last cell (the filter output)
  output sample_t y_s,        // S(n) of the last cell
  output sample_t y_m,        // M(n) of the last cell
  output logic    frame_err,  // pulse: a received byte had a bad stop bit
  output logic    overrun     // pulse: a reply was dropped for a newer one
);

  localparam int unsigned ADDR_W = 8;

  logic              rx_valid;
  logic [7:0]        rx_data;
  logic              tx_valid, tx_ready;
  logic [7:0]        tx_data;
  logic              cfg_we;
  logic [ADDR_W-1:0] cfg_addr;
  cell_cfg_t         cfg_wdata;
  cell_cfg_t         cfg [N_CELLS];
  logic              step;
  sample_t           x;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst, .rxd(uart_rxd), .valid(rx_valid), .data(rx_data),
    .frame_err
  );

  cmd_parser #(.ADDR_W(ADDR_W)) u_parser (
    .clk, .rst, .rx_valid, .rx_data,
    .cfg_we, .cfg_addr, .cfg_data(cfg_wdata),
    .step, .x, .y,
    .tx_valid, .tx_data, .tx_ready, .overrun
  );

  cfg_bank #(.N_CELLS(N_CELLS), .ADDR_W(ADDR_W)) u_cfg (
    .clk, .rst, .we(cfg_we), .waddr(cfg_addr), .wdata(cfg_wdata), .cfg
  );

  fir_array #(.N_CELLS(N_CELLS)) u_fir (
    .clk, .rst, .step, .x_in(x), .cfg, .y, .s_last(y_s), .m_last(y_m)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst, .valid(tx_valid), .data(tx_data), .ready(tx_ready),
    .txd(uart_txd)
  );

endmodule

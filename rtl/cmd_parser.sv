// cmd_parser: turns the byte stream from the PC into configuration writes
// and filter steps, and sends each filter result back.
//
// Byte protocol (all multi-byte values big-endian):
//   C0 cell sel k_hi k_lo c_hi c_lo   write the configuration of one cell:
//                                     selection bits S6..S0 in sel[6:0],
//                                     multiplication constant k, addition
//                                     constant c
//   D0 x_hi x_lo                      filter one input sample x; the device
//                                     answers with y_hi y_lo
// Any other byte where a command is expected is ignored.  A configuration
// word is applied in one clock when its last byte arrives; the filter's
// delay registers are not touched, so a new configuration takes effect
// between two samples without a reset.
//
// The published design loads configuration bits, coefficients and the data to be
// filtered over the serial port from a terminal program; the command codes,
// byte order and reply are this design's own protocol.
//
// Timing: step pulses for one clock when x_lo arrives, with x valid.  The
// filter output y is captured on the next clock and its two bytes are offered
// to the transmitter with a valid/ready handshake.  A sample command takes 30
// bit times on the line and its reply 20, so a reply always finishes before
// the next one is due when the PC sends back to back at the same bit rate.
module cmd_parser
  import fir_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  // from the receiver
  input  logic              rx_valid,
  input  logic [7:0]        rx_data,
  // to the configuration store
  output logic              cfg_we,
  output logic [ADDR_W-1:0] cfg_addr,
  output cell_cfg_t         cfg_data,
  // to and from the filter
  output logic              step,
  output sample_t           x,
  input  sample_t           y,
  // to the transmitter
  output logic              tx_valid,
  output logic [7:0]        tx_data,
  input  logic              tx_ready,
  // events, for observation
  output logic              overrun   // a result was replaced before it was sent
);

  typedef enum logic [3:0] {
    P_CMD, P_CELL, P_SEL, P_KHI, P_KLO, P_CHI, P_CLO, P_XHI, P_XLO
  } pstate_e;

  typedef enum logic [1:0] {T_IDLE, T_CAPTURE, T_HI, T_LO} tstate_e;

  pstate_e   pst;
  tstate_e   tst;
  logic [7:0] hi_byte;
  sample_t   y_q;

  // ---- receive side ------------------------------------------------------
  always_ff @(posedge clk) begin
    cfg_we <= 1'b0;
    step   <= 1'b0;
    if (rst) begin
      pst      <= P_CMD;
      cfg_addr <= '0;
      cfg_data <= CFG_IDLE;
      x        <= '0;
      hi_byte  <= '0;
    end else if (rx_valid) begin
      unique case (pst)
        P_CMD: begin
          if (rx_data == CMD_CFG)         pst <= P_CELL;
          else if (rx_data == CMD_SAMPLE) pst <= P_XHI;
        end
        P_CELL: begin cfg_addr <= ADDR_W'(rx_data); pst <= P_SEL; end
        P_SEL:  begin cfg_data.sel <= cell_sel_t'(rx_data[SEL_W-1:0]); pst <= P_KHI; end
        P_KHI:  begin hi_byte <= rx_data; pst <= P_KLO; end
        P_KLO:  begin cfg_data.mul_k <= {hi_byte, rx_data}; pst <= P_CHI; end
        P_CHI:  begin hi_byte <= rx_data; pst <= P_CLO; end
        P_CLO:  begin
          cfg_data.add_k <= {hi_byte, rx_data};
          cfg_we         <= 1'b1;
          pst            <= P_CMD;
        end
        P_XHI:  begin hi_byte <= rx_data; pst <= P_XLO; end
        P_XLO:  begin
          x    <= {hi_byte, rx_data};
          step <= 1'b1;
          pst  <= P_CMD;
        end
        default: pst <= P_CMD;
      endcase
    end
  end

  // ---- reply side --------------------------------------------------------
  // T_CAPTURE waits the clock in which the filter settles on the new sample.
  always_ff @(posedge clk) begin
    overrun <= 1'b0;
    if (rst) begin
      tst <= T_IDLE;
      y_q <= '0;
    end else begin
      if (step) begin
        if (tst == T_HI || tst == T_LO) overrun <= 1'b1;
        tst <= T_CAPTURE;
      end else begin
        unique case (tst)
          T_IDLE:    ;
          T_CAPTURE: begin y_q <= y; tst <= T_HI; end
          T_HI:      if (tx_ready) tst <= T_LO;
          T_LO:      if (tx_ready) tst <= T_IDLE;
        endcase
      end
    end
  end

  assign tx_valid = (tst == T_HI) || (tst == T_LO);
  assign tx_data  = (tst == T_HI) ? y_q[DATA_W-1:8] : y_q[7:0];

  // Handshake rule: an offered reply byte stays offered, unchanged, until the
  // transmitter takes it (unless a newer sample replaces the reply).
  a_tx_hold: assert property (@(posedge clk) disable iff (rst)
    tx_valid && !tx_ready && !step |=> tx_valid && $stable(tx_data));

endmodule

// uart_rx: serial receiver for the link from the PC (8 data bits, no
// parity, 1 stop bit, least significant bit first, line idle high).
//
// The line is synchronised with two flip-flops.  A falling edge starts a
// frame; the start bit is checked again half a bit later, then every data bit
// and the stop bit are sampled in the middle of their bit time, CLKS_PER_BIT
// clocks apart.  A byte whose stop bit is low is dropped and flagged on
// frame_err.
//
// The link is an RS-232 serial port in the published design; the frame format, the bit
// rate (CLKS_PER_BIT = 434, i.e. 115200 bit/s from a 50 MHz clock) and the
// sampling scheme are this design's choices.
//
// Timing: valid is a one-clock pulse, with data, one clock after the middle
// of the stop bit has been sampled (about 9.5 bit times after the falling
// edge of the start bit, plus two clocks of synchroniser delay).
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_err
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;

  state_e        state;
  logic [1:0]    sync;
  logic [CW-1:0] cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;

  always_ff @(posedge clk) begin
    if (rst) sync <= 2'b11;
    else     sync <= {sync[0], rxd};
  end

  wire line = sync[1];

  always_ff @(posedge clk) begin
    valid     <= 1'b0;
    frame_err <= 1'b0;
    if (rst) begin
      state   <= IDLE;
      cnt     <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      data    <= '0;
    end else begin
      unique case (state)
        IDLE: if (!line) begin
          state <= START;
          cnt   <= CW'(CLKS_PER_BIT / 2);
        end
        START: if (cnt != 0) cnt <= cnt - 1'b1;
          else if (line) state <= IDLE;           // glitch, not a start bit
          else begin
            state   <= DATA;
            cnt     <= CW'(CLKS_PER_BIT - 1);
            bit_idx <= '0;
          end
        DATA: if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            shreg <= {line, shreg[7:1]};
            cnt   <= CW'(CLKS_PER_BIT - 1);
            if (bit_idx == 3'd7) state <= STOP;
            bit_idx <= bit_idx + 1'b1;
          end
        STOP: if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            state <= IDLE;
            if (line) begin
              valid <= 1'b1;
              data  <= shreg;
            end else begin
              frame_err <= 1'b1;
            end
          end
      endcase
    end
  end

endmodule

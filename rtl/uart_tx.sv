// uart_tx: serial transmitter for the link back to the PC (8 data bits, no
// parity, 1 stop bit, least significant bit first, line idle high).
//
// A byte is taken with a valid/ready handshake: ready is high while the
// transmitter is idle, and a clock edge with valid and ready both high starts
// a frame of ten bits, each CLKS_PER_BIT clocks long.  ready rises again after
// the stop bit.
//
// The return direction of the serial link is in the published design; the frame format,
// bit rate and handshake are this design's choices.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    frame;   // stop, data[7:0], start; bit 0 is on the line
  logic [3:0]    left;    // bits still to send, including the current one
  logic [CW-1:0] cnt;

  assign ready = (left == 0);
  assign txd   = (left == 0) ? 1'b1 : frame[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      frame <= '1;
      left  <= '0;
      cnt   <= '0;
    end else if (left == 0) begin
      if (valid) begin
        frame <= {1'b1, data, 1'b0};
        left  <= 4'd10;
        cnt   <= CW'(CLKS_PER_BIT - 1);
      end
    end else if (cnt != 0) begin
      cnt <= cnt - 1'b1;
    end else begin
      frame <= {1'b1, frame[9:1]};
      left  <= left - 1'b1;
      cnt   <= CW'(CLKS_PER_BIT - 1);
    end
  end

endmodule

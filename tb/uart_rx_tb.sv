// uart_rx_tb: self-checking test of the serial receiver.
//
// Sends random bytes as 8N1 frames at CLKS_PER_BIT = 32, with random idle
// gaps and bit times up to one clock (3%) long or short, and checks every byte received.
// Also sends frames with a low stop bit (must raise frame_err and deliver no
// byte) and a short low glitch (must be ignored).  The time from the start
// edge to valid must be about 9.5 bit times.
module uart_rx_tb;

  localparam int CPB = 32;

  logic       clk = 1'b0;
  logic       rst, rxd;
  logic       valid, frame_err;
  logic [7:0] data;
  int         checks = 0, failures = 0;
  byte unsigned exp_q [$];
  int         n_err = 0;
  longint     t_start, t_valid;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(byte unsigned b, bit stop, int bitlen);
    rxd = 0; t_start = $time;
    repeat (bitlen) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i];
      repeat (bitlen) @(negedge clk);
    end
    rxd = stop;
    repeat (bitlen) @(negedge clk);
    rxd = 1;
  endtask

  always @(posedge clk) if (!rst) begin
    if (valid) begin
      t_valid = $time;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected byte %h", data); end
      else begin
        automatic byte unsigned e = exp_q.pop_front();
        if (data !== e) begin failures++; $display("got %h exp %h", data, e); end
      end
    end
    if (frame_err) n_err++;
  end

  initial begin
    rst = 1; rxd = 1;
    repeat (3) @(negedge clk); rst = 0;
    repeat (20) @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      automatic byte unsigned b = 8'($urandom);
      automatic int len = CPB + (n % 3 == 1 ? 1 : 0) - (n % 3 == 2 ? 1 : 0);
      exp_q.push_back(b);
      send(b, 1, len);
      repeat ($urandom_range(0, 2 * CPB)) @(negedge clk);
      if (n == 0) begin
        // latency: valid at about 9.5 bit times after the start edge
        checks++;
        if ((t_valid - t_start) / 10 < 9 * CPB || (t_valid - t_start) / 10 > 10 * CPB) begin
          failures++; $display("latency %0d clocks", (t_valid - t_start) / 10);
        end
      end
    end
    // bad stop bits
    for (int n = 0; n < 5; n++) begin
      send(8'h5A, 0, CPB);
      rxd = 1; repeat (3 * CPB) @(negedge clk);
    end
    // glitch shorter than half a bit
    rxd = 0; repeat (CPB / 4) @(negedge clk); rxd = 1;
    repeat (4 * CPB) @(negedge clk);
    exp_q.push_back(8'hA5); send(8'hA5, 1, CPB);
    repeat (2 * CPB) @(negedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d bytes not received", exp_q.size()); end
    checks++; if (n_err != 5) begin failures++; $display("frame errors %0d, exp 5", n_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

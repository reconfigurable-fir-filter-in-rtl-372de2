// uart_tx_tb: self-checking test of the serial transmitter.
//
// Offers random bytes with random gaps at CLKS_PER_BIT = 16 and decodes the
// line here, sampling each bit in its middle: start bit low, eight data bits
// LSB first, stop bit high.  Checks that ready is low for exactly ten bit
// times per byte and that the line idles high.
module uart_tx_tb;

  localparam int CPB = 16;

  logic       clk = 1'b0;
  logic       rst, valid, ready, txd;
  logic [7:0] data;
  int         checks = 0, failures = 0;
  byte unsigned sent_q [$];
  int         busy_len = 0, frames = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // busy time per byte
  always @(posedge clk) if (!rst) begin
    if (!ready) busy_len++;
    else if (busy_len != 0) begin
      checks++;
      if (busy_len != 10 * CPB) begin failures++; $display("busy %0d clocks", busy_len); end
      busy_len = 0;
    end
  end

  // line decoder
  initial begin
    byte unsigned b;
    @(negedge rst);
    forever begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      checks++; if (txd !== 0) begin failures++; $display("bad start bit"); end
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      checks++; if (txd !== 1) begin failures++; $display("bad stop bit"); end
      checks++;
      if (sent_q.size() == 0) begin failures++; $display("spurious frame"); end
      else begin
        automatic byte unsigned e = sent_q.pop_front();
        if (b !== e) begin failures++; $display("line %h exp %h", b, e); end
      end
      frames++;
    end
  end

  initial begin
    rst = 1; valid = 0; data = 0;
    repeat (3) @(negedge clk);
    checks++; if (txd !== 1) begin failures++; $display("line not idle in reset"); end
    rst = 0;
    for (int n = 0; n < 100; n++) begin
      repeat ($urandom_range(0, 3) == 0 ? $urandom_range(1, 40) : 0) @(negedge clk);
      data = 8'($urandom); valid = 1;
      do @(posedge clk); while (!ready);
      sent_q.push_back(data);
      @(negedge clk); valid = 0;
    end
    while (!ready) @(negedge clk);
    repeat (CPB) @(negedge clk);
    checks++; if (frames != 100) begin failures++; $display("frames %0d", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

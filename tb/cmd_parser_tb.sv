// cmd_parser_tb: self-checking test of the byte-protocol decoder.
//
// Feeds bytes on rx_valid/rx_data: configuration commands for random cells
// (including indices past the last cell, passed on unchanged), sample
// commands, and junk bytes between commands that must be ignored.  Checks
// each cfg_we pulse (cell, selection bits, both constants) and each step
// pulse (sample value).  The filter is stood in for by y = 3*x - 5 of the
// last sample, registered like the real filter's input; the two reply bytes
// are checked, with the transmitter's ready held low at random, and the
// reply must start no later than two clocks after the step.
module cmd_parser_tb;
  import fir_pkg::*;

  logic       clk = 1'b0;
  logic       rst, rx_valid, cfg_we, step, tx_valid, tx_ready, overrun;
  logic [7:0] rx_data, cfg_addr, tx_data;
  cell_cfg_t  cfg_data;
  sample_t    x, y, x_reg;
  int         checks = 0, failures = 0;
  int         n_cfg = 0, n_step = 0, n_reply = 0;

  typedef struct { logic [7:0] addr; logic [6:0] sel; shortint k, c; } cfg_exp_t;
  cfg_exp_t   cfg_q [$];
  sample_t    x_q [$];
  byte unsigned reply_q [$];
  longint     t_step;

  cmd_parser #(.ADDR_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stand-in filter: registered input, combinational output
  always @(posedge clk) if (step) x_reg <= x;
  assign y = sample_t'(3 * x_reg - 5);

  always @(posedge clk) if (!rst) begin
    tx_ready <= $urandom_range(0, 3) == 0;
    if (cfg_we) begin
      n_cfg++; checks++;
      if (cfg_q.size() == 0) begin failures++; $display("unexpected cfg write"); end
      else begin
        automatic cfg_exp_t e = cfg_q.pop_front();
        if (cfg_addr !== e.addr || 7'(cfg_data.sel) !== e.sel ||
            cfg_data.mul_k !== e.k || cfg_data.add_k !== e.c) begin
          failures++;
          $display("cfg got %0d %b %0d %0d exp %0d %b %0d %0d", cfg_addr, cfg_data.sel,
                   cfg_data.mul_k, cfg_data.add_k, e.addr, e.sel, e.k, e.c);
        end
      end
    end
    if (step) begin
      n_step++; checks++; t_step = $time;
      if (x_q.size() == 0) begin failures++; $display("unexpected step"); end
      else begin
        automatic sample_t e = x_q.pop_front();
        automatic sample_t ey = sample_t'(3 * e - 5);
        if (x !== e) begin failures++; $display("x got %0d exp %0d", x, e); end
        reply_q.push_back(ey[15:8]); reply_q.push_back(ey[7:0]);
      end
    end
    if (overrun) begin failures++; $display("overrun with paced commands"); end
    if (tx_valid && tx_ready) begin
      n_reply++; checks++;
      if (reply_q.size() == 0) begin failures++; $display("unexpected reply byte"); end
      else begin
        automatic byte unsigned e = reply_q.pop_front();
        if (tx_data !== e) begin failures++; $display("reply %h exp %h", tx_data, e); end
      end
    end
  end

  // reply latency: tx_valid within two clocks of the step
  always @(posedge tx_valid) begin
    checks++;
    if (($time - t_step) / 10 > 2) begin failures++; $display("reply late"); end
  end

  task automatic put(byte unsigned b);
    rx_data = b; rx_valid = 1;
    @(negedge clk); rx_valid = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  initial begin
    rst = 1; rx_valid = 0; rx_data = 0; x_reg = 0; tx_ready = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int n = 0; n < 300; n++) begin
      case ($urandom_range(0, 2))
        0: begin
          automatic cfg_exp_t e;
          e.addr = 8'($urandom_range(0, 20)); e.sel = 7'($urandom);
          e.k = shortint'($urandom); e.c = shortint'($urandom);
          cfg_q.push_back(e);
          put(CMD_CFG); put(e.addr); put({1'b0, e.sel});
          put(e.k[15:8]); put(e.k[7:0]); put(e.c[15:8]); put(e.c[7:0]);
        end
        1: begin
          automatic sample_t v = sample_t'($urandom);
          x_q.push_back(v);
          put(CMD_SAMPLE); put(v[15:8]); put(v[7:0]);
          while (x_q.size() != 0 || reply_q.size() != 0) @(negedge clk);  // wait for the reply
        end
        default: put(8'($urandom_range(0, 8'hBF)));     // junk, ignored
      endcase
    end
    repeat (20) @(negedge clk);
    checks++; if (cfg_q.size() != 0 || x_q.size() != 0 || reply_q.size() != 0) begin
      failures++; $display("left over: %0d cfg %0d samples %0d reply bytes",
                           cfg_q.size(), x_q.size(), reply_q.size());
    end
    checks++; if (n_cfg == 0 || n_step == 0) begin failures++; $display("a command never ran"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// fir_top_tb: end-to-end test of the serial-controlled reconfigurable FIR
// filter at its default size (16 cells, 434 clocks per bit).
//
// The testbench plays the PC: it sends configuration and sample commands as
// 8N1 frames on uart_rxd and decodes the replies on uart_txd.  Every reply
// is compared with the chain model in fir_ref_pkg and, for canonical
// filters, also with the convolution sum computed from the sample history.
// The run goes through:
//   1. samples before any configuration (filter outputs 0),
//   2. a 16-tap canonical filter: impulse response, then random samples,
//   3. new coefficients written while samples are held (no reset),
//   4. a topology change to 5 taps, the remaining cells passing A through,
//   5. bypass settings: undelayed S path, multiplication constant 1,
//      addition constant 0 and a non-zero addition constant,
//   6. random selection bits in every cell (S from M(p)/A(p), operands from
//      S(p)/M(p)/A(p)), rewritten cell by cell between samples,
//   7. a frame with a bad stop bit, which must be flagged and ignored.
// Each mechanism is counted and a failure is counted for one never seen.
// The reply must start within one bit time of the command's stop bit.  A
// canonical filter is checked against the convolution sum only once its
// delay line holds samples taken in that topology.
module fir_top_tb;
  import fir_pkg::*;
  import fir_ref_pkg::*;

  localparam int N   = 16;    // the top's defaults
  localparam int CPB = 434;

  logic    clk = 1'b0;
  logic    rst, uart_rxd, uart_txd, frame_err, overrun;
  sample_t y, y_s, y_m;

  fir_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_cfg = 0, n_sample = 0, n_recfg_live = 0, n_taps_change = 0;
  int n_no_delay = 0, n_delay = 0, n_mul1 = 0, n_add0 = 0, n_addc = 0;
  int n_s_from_m = 0, n_s_from_a = 0, n_op_s = 0, n_op_m = 0, n_op_a = 0;
  int n_frame_err = 0;

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- PC side of the serial link ----------------------------------------
  longint t_cmd_end;

  task automatic send_byte(byte unsigned b, bit stop = 1'b1);
    uart_rxd = 1'b0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      uart_rxd = b[i];
      repeat (CPB) @(posedge clk);
    end
    uart_rxd = stop;
    repeat (CPB) @(posedge clk);
    uart_rxd = 1'b1;
    t_cmd_end = $time;
  endtask

  byte unsigned rx_q [$];
  longint       t_start_q [$];   // start time of each received byte

  initial begin : decoder
    byte unsigned b;
    @(negedge rst);
    forever begin
      @(negedge uart_txd);
      t_start_q.push_back($time);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (CPB) @(posedge clk);
      checks++;
      if (uart_txd !== 1'b1) begin failures++; $display("reply stop bit low"); end
      rx_q.push_back(b);
    end
  end

  always @(posedge clk) if (!rst) begin
    if (frame_err) n_frame_err++;
    if (overrun) begin failures++; $display("reply overrun"); end
  end

  // ---- model -------------------------------------------------------------
  ref_cfg_t   rc [MAXC];
  ref_state_t rs;
  shortint    hist [N];
  shortint    k [N];

  task automatic write_cell(int idx, int unsigned sel, shortint kk, shortint cc);
    send_byte(CMD_CFG); send_byte(8'(idx)); send_byte(8'(sel));
    send_byte(kk[15:8]); send_byte(kk[7:0]); send_byte(cc[15:8]); send_byte(cc[7:0]);
    if (idx < N) begin rc[idx].sel = sel & 127; rc[idx].k = kk; rc[idx].c = cc; end
    n_cfg++;
  endtask

  function automatic int unsigned selbits(int m1, int m2, int m3, int m4);
    return (m4 << 5) | (m3 << 3) | (m2 << 2) | m1;
  endfunction

  task automatic canonical(int taps);
    for (int i = 0; i < N; i++)
      if (i < taps) write_cell(i, selbits(0, i == 0 ? 0 : 1, 3, 2), k[i], 0);
      else          write_cell(i, selbits(0, 1, 3, 2), 0, 0);
  endtask

  function automatic shortint conv(int taps);
    int acc = 0;
    for (int i = 0; i < taps; i++) acc += int'(k[i]) * int'(hist[i]);
    return shortint'(acc);
  endfunction

  // sends one sample, checks the reply against the model; taps > 0 also
  // checks the convolution sum of a canonical filter of that many taps
  task automatic sample(shortint v, int taps = 0);
    shortint es, em, ea, got;
    longint  t_reply_start;
    send_byte(CMD_SAMPLE); send_byte(v[15:8]); send_byte(v[7:0]);
    advance(rc, N, rs, v);
    eval(rc, N, rs, es, em, ea);
    for (int i = N-1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = v;
    while (rx_q.size() < 2) @(posedge clk);
    got = {rx_q.pop_front(), rx_q.pop_front()};
    t_reply_start = t_start_q.pop_front();
    void'(t_start_q.pop_front());
    n_sample++;
    checks++;
    if (got !== ea) begin failures++; $display("sample %0d: reply %0d exp %0d", n_sample, got, ea); end
    checks++;
    if (y !== ea || y_s !== es || y_m !== em) begin
      failures++; $display("sample %0d: ports %0d/%0d/%0d exp %0d/%0d/%0d",
                           n_sample, y_s, y_m, y, es, em, ea);
    end
    if (taps > 0) begin
      checks++;
      if (got !== conv(taps)) begin failures++; $display("conv %0d exp %0d", got, conv(taps)); end
    end
    // the reply starts once the middle of the command's stop bit has been
    // sampled, i.e. within one bit time of the end of the command
    checks++;
    if (t_reply_start < t_cmd_end - 10 * CPB || t_reply_start > t_cmd_end + 10 * CPB) begin
      failures++; $display("reply latency %0d clocks", (t_reply_start - t_cmd_end) / 10);
    end
    // what the configuration in force used
    for (int i = 0; i < N; i++) begin
      automatic int unsigned s = rc[i].sel;
      if (((s >> 2) & 1) == 0) n_no_delay++; else n_delay++;
      if ((s & 3) == 1) n_s_from_m++;
      if ((s & 3) == 2) n_s_from_a++;
      if (((s >> 3) & 3) == 3 && rc[i].k == 1) n_mul1++;
      if (((s >> 5) & 3) == 3 && rc[i].c == 0) n_add0++;
      if (((s >> 5) & 3) == 3 && rc[i].c != 0) n_addc++;
      if (((s >> 3) & 3) == 0 || ((s >> 5) & 3) == 0) n_op_s++;
      if (((s >> 3) & 3) == 1 || ((s >> 5) & 3) == 1) n_op_m++;
      if (((s >> 3) & 3) == 2 || ((s >> 5) & 3) == 2) n_op_a++;
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", what); end
    else $display("  %-34s %0d", what, n);
  endtask

  initial begin
    rst = 1; uart_rxd = 1;
    rs.x = 0;
    for (int i = 0; i < MAXC; i++) begin rs.d[i] = 0; rc[i] = '{sel: selbits(0, 1, 3, 2), k: 0, c: 0}; end
    for (int i = 0; i < N; i++) hist[i] = 0;
    repeat (5) @(posedge clk); rst = 0;
    repeat (100) @(posedge clk);

    // 1. power-up configuration
    sample(1234);
    sample(-77);

    // 2. canonical 16-tap filter
    for (int i = 0; i < N; i++) k[i] = shortint'(i < N/2 ? i + 1 : N - i);   // triangle
    canonical(N);
    for (int i = 0; i < N; i++) sample(0);     // flush the line after the topology change
    sample(1, N);
    for (int i = 1; i < N + 2; i++) sample(0, N);
    for (int i = 0; i < 12; i++) sample(shortint'($urandom_range(0, 2000)) - 1000, N);

    // 3. new coefficients, delay line keeps its samples
    for (int i = 0; i < N; i++) k[i] = shortint'($urandom_range(0, 40)) - 20;
    for (int i = 0; i < N; i++) write_cell(i, selbits(0, i == 0 ? 0 : 1, 3, 2), k[i], 0);
    for (int i = 0; i < 6; i++) begin sample(shortint'($urandom_range(0, 2000)) - 1000, N); n_recfg_live++; end

    // 4. five taps
    canonical(5); n_taps_change++;
    for (int i = 0; i < 8; i++) sample(shortint'($urandom_range(0, 2000)) - 1000, 5);

    // 5. bypasses: cell 1 undelayed, k = 1; cell 2 adds a constant
    write_cell(1, selbits(0, 0, 3, 2), 1, 0);
    write_cell(2, selbits(0, 1, 3, 3), 2, 100);
    write_cell(3, selbits(0, 1, 3, 3), 1, 0);
    for (int i = 0; i < 6; i++) sample(shortint'($urandom_range(0, 200)) - 100);

    // 6. random topologies, rewritten cell by cell between samples
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < N; i++)
        write_cell(i, $urandom_range(0, 127), shortint'($urandom_range(0, 6)) - 3,
                   shortint'($urandom));
      for (int i = 0; i < 4; i++) sample(shortint'($urandom));
    end
    for (int i = 0; i < 6; i++) begin
      write_cell($urandom_range(0, N - 1), $urandom_range(0, 127),
                 shortint'($urandom_range(0, 6)) - 3, shortint'($urandom));
      sample(shortint'($urandom));
    end
    // a write past the last cell changes nothing
    write_cell(N + 3, 0, 5, 5);
    sample(shortint'($urandom));

    // 7. bad stop bit: flagged, byte dropped, protocol continues
    send_byte(CMD_SAMPLE, 1'b0);
    repeat (3 * CPB) @(posedge clk);
    sample(shortint'($urandom));

    $display("mechanisms:");
    need("configuration word written", n_cfg);
    need("sample filtered", n_sample);
    need("coefficients changed without reset", n_recfg_live);
    need("number of taps changed", n_taps_change);
    need("S(n) without delay", n_no_delay);
    need("S(n) through the delay", n_delay);
    need("S(n) taken from M(p)", n_s_from_m);
    need("S(n) taken from A(p)", n_s_from_a);
    need("multiplication constant 1", n_mul1);
    need("addition constant 0", n_add0);
    need("non-zero addition constant", n_addc);
    need("operand from S(p)", n_op_s);
    need("operand from M(p)", n_op_m);
    need("operand from A(p)", n_op_a);
    need("frame error flagged", n_frame_err);
    repeat (10) @(posedge clk);
    checks++; if (rx_q.size() != 0) begin failures++; $display("%0d stray reply bytes", rx_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
